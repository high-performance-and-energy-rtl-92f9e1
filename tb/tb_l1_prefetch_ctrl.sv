// Self-checking test of l1_prefetch_ctrl: next-line trigger one cycle after
// a core fetch, software enable, probe filtering, no prefetch of the line
// being refilled, request held until granted, buffered line written when the
// write port is free, discarded after a branch, and a dropped response.
module tb_l1_prefetch_ctrl;
  import icache_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic pf_en, facc, phit, rbusy, req, gnt, rvalid, drop, inflight, bvld, wreq, wgnt, issued, dbr;
  addr_t faddr, paddr_probe, raddr, req_addr, pfa;
  line_t rdata, bdata;
  int checks = 0, failures = 0;

  l1_prefetch_ctrl dut (
    .clk_i(clk), .rst_ni(rst_n), .pf_en_i(pf_en),
    .fetch_acc_i(facc), .fetch_addr_i(faddr),
    .probe_addr_o(paddr_probe), .probe_hit_i(phit),
    .refill_busy_i(rbusy), .refill_addr_i(raddr),
    .req_o(req), .req_addr_o(req_addr), .gnt_i(gnt),
    .rvalid_i(rvalid), .rdata_i(rdata), .drop_i(drop),
    .inflight_o(inflight), .pf_addr_o(pfa), .buf_vld_o(bvld), .buf_data_o(bdata),
    .wr_req_o(wreq), .wr_gnt_i(wgnt), .issued_o(issued), .dropped_branch_o(dbr)
  );

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic clear();
    facc = 0; phit = 0; rbusy = 0; gnt = 0; rvalid = 0; drop = 0; wgnt = 0;
  endtask

  // one core fetch in this cycle, then move to the probe cycle
  task automatic core_fetch(addr_t a);
    facc = 1; faddr = a;
    @(negedge clk); facc = 0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear(); pf_en = 0; faddr = '0; raddr = '0; rdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // disabled: nothing happens
    core_fetch(32'h100);
    #1 check(paddr_probe == 32'h110 && !req, "disabled prefetcher stays quiet");
    @(negedge clk);

    // enabled: probe and request in the cycle after the fetch
    pf_en = 1;
    core_fetch(32'h104);
    #1 check(paddr_probe == 32'h110, "probe of the next line");
    check(req && req_addr == 32'h110 && issued, "prefetch request in the probe cycle");
    @(negedge clk);                         // not granted
    check(req && req_addr == 32'h110 && inflight, "request held until granted");
    gnt = 1; @(negedge clk); gnt = 0;
    check(!req && inflight && pfa == 32'h110, "waiting for the line");
    core_fetch(32'h108);                    // trigger while busy: ignored
    check(!req, "no second prefetch while one is in flight");
    rvalid = 1; rdata = {4{32'hABCD_0110}};
    @(negedge clk); rvalid = 0;
    check(bvld && bdata == {4{32'hABCD_0110}} && wreq, "line buffered, write requested");
    @(negedge clk);
    check(bvld && wreq, "write waits for the port");
    wgnt = 1; #1 check(!dbr, "useful line is not discarded");
    @(negedge clk); wgnt = 0;
    check(!bvld && !inflight, "idle after the write");

    // probe filtering: next line present
    core_fetch(32'h110);
    phit = 1; #1 check(!req && !issued, "probe hit filters the prefetch");
    @(negedge clk); phit = 0;

    // next line is being refilled
    rbusy = 1; raddr = 32'h130;
    core_fetch(32'h120);
    #1 check(!req, "no prefetch of the line being refilled");
    @(negedge clk); rbusy = 0;

    // branch: line arrives after a fetch elsewhere -> discarded
    core_fetch(32'h200);
    gnt = 1; #1 check(req && req_addr == 32'h210, "prefetch of 0x210");
    @(negedge clk); gnt = 0;
    core_fetch(32'h800);
    rvalid = 1; rdata = '1;
    @(negedge clk); rvalid = 0;
    #1 check(bvld && !wreq && dbr, "prefetched line dropped after a branch");
    @(negedge clk);
    check(!bvld && !inflight, "idle after the discard");

    // dropped response
    core_fetch(32'h300);
    gnt = 1; @(negedge clk); gnt = 0;
    check(inflight, "prefetch of 0x310 in flight");
    drop = 1; @(negedge clk); drop = 0;
    check(!inflight && !bvld, "dropped response ends the prefetch");
    core_fetch(32'h310);
    #1 check(req && req_addr == 32'h320, "prefetcher restarts on the next fetch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
