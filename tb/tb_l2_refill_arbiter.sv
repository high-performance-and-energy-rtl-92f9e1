// Self-checking test of l2_refill_arbiter (2 banks): request forwarding with
// the {bank, tag} ID, grant to the chosen bank only, round-robin alternation
// under load, and response steering and ready by the returned ID.
module tb_l2_refill_arbiter;
  import icache_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] breq, bgnt, brv, brdy;
  addr_t [1:0] baddr;
  logic [1:0][1:0] btag;
  line_t brdata, l2_rdata;
  logic [1:0] brtag;
  logic l2_req, l2_gnt, l2_rvalid, l2_rready;
  addr_t l2_addr;
  logic [2:0] l2_id, l2_rid;
  int checks = 0, failures = 0;

  l2_refill_arbiter dut (
    .clk_i(clk), .rst_ni(rst_n),
    .b_req_i(breq), .b_addr_i(baddr), .b_tag_i(btag), .b_gnt_o(bgnt),
    .b_rvalid_o(brv), .b_rdata_o(brdata), .b_rtag_o(brtag), .b_rready_i(brdy),
    .l2_req_o(l2_req), .l2_addr_o(l2_addr), .l2_id_o(l2_id), .l2_gnt_i(l2_gnt),
    .l2_rvalid_i(l2_rvalid), .l2_rdata_i(l2_rdata), .l2_rid_i(l2_rid), .l2_rready_o(l2_rready)
  );

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, alt;
    breq = 0; baddr = '0; btag = '0; brdy = 0; l2_gnt = 0; l2_rvalid = 0; l2_rdata = '0; l2_rid = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      breq = $urandom; baddr[0] = $urandom; baddr[1] = $urandom; btag = $urandom;
      l2_gnt = $urandom; brdy = $urandom;
      l2_rvalid = $urandom; l2_rid = $urandom; l2_rdata = {4{$urandom}};
      #1;
      check(l2_req == |breq, "L2 request when any bank asks");
      if (l2_req) begin
        int b;
        b = l2_id[2];
        check(breq[b] && l2_addr == baddr[b] && l2_id[1:0] == btag[b], "forwarded request and ID");
        check(bgnt == (l2_gnt ? (2'b01 << b) : 2'b00), "grant to the forwarded bank only");
      end else check(bgnt == 0, "no grant without request");
      check(brv == (l2_rvalid ? (2'b01 << l2_rid[2]) : 2'b00), "response to the bank in the ID");
      check(brtag == l2_rid[1:0] && brdata == l2_rdata, "response tag and data");
      check(l2_rready == brdy[l2_rid[2]], "ready of the addressed bank");
    end
    // round robin under load
    @(negedge clk);
    breq = 2'b11; l2_gnt = 1; l2_rvalid = 0;
    last = -1; alt = 0;
    for (int i = 0; i < 20; i++) begin
      #1;
      if (last >= 0 && int'(l2_id[2]) != last) alt++;
      last = l2_id[2];
      @(negedge clk);
    end
    check(alt == 19, "banks alternate under load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
