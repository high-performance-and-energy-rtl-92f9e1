// Self-checking test of log_interconnect (8 masters, 2 banks, response
// buffer on, request buffer off): bank selection by address, one grant per
// bank, round-robin fairness under full load, response routing with one
// cycle of buffering, and the refill-over-prefetch rule when two banks
// answer the same master in one cycle.
module tb_log_interconnect;
  import icache_pkg::*;

  localparam int NM = 8, NB = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic     [NM-1:0] mreq, mgnt, mrv, mdrop;
  l15_req_t [NM-1:0] mreq_d;
  l15_rsp_t [NM-1:0] mrsp;
  logic     [NB-1:0] breq, bgnt, brv;
  l15_req_t [NB-1:0] breq_d;
  l15_rsp_t [NB-1:0] brsp;
  logic [NB-1:0][2:0] bsrc, brsrc;
  int checks = 0, failures = 0;

  log_interconnect dut (
    .clk_i(clk), .rst_ni(rst_n),
    .mst_req_i(mreq), .mst_req_data_i(mreq_d), .mst_gnt_o(mgnt),
    .mst_rvalid_o(mrv), .mst_rsp_o(mrsp), .mst_drop_o(mdrop),
    .bank_req_o(breq), .bank_req_data_o(breq_d), .bank_src_o(bsrc), .bank_gnt_i(bgnt),
    .bank_rvalid_i(brv), .bank_rsp_i(brsp), .bank_rsrc_i(brsrc)
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
    int cnt [NM];
    mreq = '0; mreq_d = '0; bgnt = '0; brv = '0; brsp = '0; brsrc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // random request routing
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      for (int m = 0; m < NM; m++) begin
        mreq[m] = $urandom;
        mreq_d[m].id   = xfer_id_e'($urandom % 2);
        mreq_d[m].addr = {$urandom} & ~32'hF;
      end
      bgnt = $urandom;
      #1;
      for (int b = 0; b < NB; b++) begin
        bit any;
        any = 0;
        for (int m = 0; m < NM; m++) any |= mreq[m] && mreq_d[m].addr[4] == b;
        check(breq[b] == any, "bank request when a master addresses it");
        if (breq[b]) begin
          check(mreq[bsrc[b]] && mreq_d[bsrc[b]].addr[4] == b, "bank source addresses this bank");
          check(breq_d[b] == mreq_d[bsrc[b]], "request payload routed");
        end
      end
      for (int m = 0; m < NM; m++) begin
        bit exp;
        int b;
        b = mreq_d[m].addr[4];
        exp = mreq[m] && bgnt[b] && breq[b] && bsrc[b] == m;
        check(mgnt[m] == exp, "grant only to the selected master");
      end
    end

    // fairness: all masters on bank 0, bank always ready
    @(negedge clk);
    foreach (cnt[m]) cnt[m] = 0;
    mreq = '1; bgnt = 2'b01;
    for (int m = 0; m < NM; m++) mreq_d[m].addr = 32'h0000_1000 + m * 32;
    for (int i = 0; i < 8 * NM; i++) begin
      #1;
      for (int m = 0; m < NM; m++) if (mgnt[m]) cnt[m]++;
      @(negedge clk);
    end
    foreach (cnt[m]) check(cnt[m] == 8, $sformatf("master %0d granted %0d of 64 times", m, cnt[m]));
    mreq = '0; bgnt = '0;

    // response routing, one cycle later
    for (int i = 0; i < 500; i++) begin
      l15_rsp_t r0, r1;
      int s0, s1;
      @(negedge clk);
      s0 = $urandom % NM; s1 = $urandom % NM;
      r0.id = xfer_id_e'($urandom % 2); r0.data = {4{$urandom}};
      r1.id = (s0 == s1) ? xfer_id_e'(!r0.id) : xfer_id_e'($urandom % 2);
      r1.data = {4{$urandom}};
      brv = 2'b11; brsrc[0] = 3'(s0); brsrc[1] = 3'(s1); brsp[0] = r0; brsp[1] = r1;
      @(negedge clk);
      brv = '0;
      if (s0 != s1) begin
        check(mrv[s0] && mrsp[s0] == r0 && !mdrop[s0], "bank 0 response routed");
        check(mrv[s1] && mrsp[s1] == r1 && !mdrop[s1], "bank 1 response routed");
        check($countones(mrv) == 2, "no other master sees a response");
      end else begin
        check(mrv[s0] && mdrop[s0], "collision: one response kept, one dropped");
        check(mrsp[s0].id == ID_REFILL && mrsp[s0] == (r0.id == ID_REFILL ? r0 : r1),
              "collision keeps the refill");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
