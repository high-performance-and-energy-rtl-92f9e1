// Self-checking test of l1_ooo_arbiter: refill priority, the ID placed in
// the request MSB, grant steering, response steering by ID and the drop
// signal, over random input combinations checked against a reference.
module tb_l1_ooo_arbiter;
  import icache_pkg::*;

  logic rreq, rgnt, rrv, preq, pgnt, prv, pdrop, req, gnt, rvalid, drop;
  addr_t raddr, paddr;
  line_t rdata;
  l15_req_t req_data;
  l15_rsp_t rsp;
  int checks = 0, failures = 0;

  l1_ooo_arbiter dut (
    .refill_req_i(rreq), .refill_addr_i(raddr), .refill_gnt_o(rgnt), .refill_rvalid_o(rrv),
    .pf_req_i(preq), .pf_addr_i(paddr), .pf_gnt_o(pgnt), .pf_rvalid_o(prv), .pf_drop_o(pdrop),
    .rdata_o(rdata), .l15_req_o(req), .l15_req_data_o(req_data), .l15_gnt_i(gnt),
    .l15_rvalid_i(rvalid), .l15_rsp_i(rsp), .l15_drop_i(drop)
  );

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      rreq = $urandom; preq = $urandom; gnt = $urandom;
      raddr = $urandom; paddr = $urandom;
      rvalid = $urandom; drop = $urandom;
      rsp.id = xfer_id_e'($urandom % 2);
      rsp.data = {$urandom, $urandom, $urandom, $urandom};
      #1;
      check(req == (rreq | preq), "request OR");
      if (rreq) check(req_data == {1'b0, raddr}, "refill request with ID 0 in the MSB");
      else if (preq) check(req_data == {1'b1, paddr}, "prefetch request with ID 1 in the MSB");
      check(rgnt == (rreq & gnt), "refill grant");
      check(pgnt == (!rreq & preq & gnt), "prefetch grant only without refill");
      check(rrv == (rvalid && rsp.id == ID_REFILL), "refill response by ID");
      check(prv == (rvalid && rsp.id == ID_PREFETCH), "prefetch response by ID");
      check(pdrop == drop, "drop to prefetcher");
      check(rdata == rsp.data, "response data");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
