// Self-checking test of log_interconnect in its other buffer setting:
// request buffer on, response buffer off (8 masters, 2 banks).
//
// Masters issue random requests and hold each one until it is granted, as
// the L1 caches do; banks grant at random. A scoreboard per master checks
// that every granted request reaches the bank its address selects exactly
// once, in order, with the right source index and payload, and never in the
// cycle it was granted to the master (the request slice adds one cycle).
// With the response buffer off, a bank response must reach its master in
// the same cycle, and a collision must still keep the refill response.
//
// The two buffers being selectable by parameter comes from the design
// description; the traffic pattern is this test's.
module tb_log_interconnect_bufs;
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
  logic [NM-1:0] mgnt_q = '0;  // handshakes of the last edge, for the driver

  log_interconnect #(.NB_MST(NM), .NB_BANKS(NB), .REQ_BUF(1'b1), .RSP_BUF(1'b0)) dut (
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

  // per-master queue of granted requests not yet seen at a bank
  l15_req_t sent [NM][$];
  int       sent_cyc [NM][$];
  int       cyc = 0, n_sent = 0, n_recv = 0;

  // sample the handshakes just before each rising edge
  always @(negedge clk) if (rst_n) begin
    #4;
    for (int m = 0; m < NM; m++)
      if (mreq[m] && mgnt[m]) begin
        sent[m].push_back(mreq_d[m]);
        sent_cyc[m].push_back(cyc);
        n_sent++;
      end
    for (int b = 0; b < NB; b++)
      if (breq[b] && bgnt[b]) begin
        int s;
        s = int'(bsrc[b]);
        check(breq_d[b].addr[4] == 1'(b), "request reaches the bank its address selects");
        if (sent[s].size() == 0) check(1'b0, "bank request with nothing granted to that master");
        else begin
          check(breq_d[b] == sent[s][0], "granted requests reach the banks in order");
          check(sent_cyc[s][0] < cyc, "request slice adds a cycle");
          void'(sent[s].pop_front());
          void'(sent_cyc[s].pop_front());
          n_recv++;
        end
      end
  end
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) mgnt_q <= mreq & mgnt;

  initial begin
    mreq = '0; mreq_d = '0; bgnt = '0; brv = '0; brsp = '0; brsrc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // random traffic, each request held until granted
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk); #1;
      for (int m = 0; m < NM; m++) begin
        // a request granted at this edge is done: maybe issue a new one
        if (!mreq[m] || mgnt_q[m]) begin
          mreq[m] = ($urandom % 3) != 0;
          mreq_d[m].id   = xfer_id_e'($urandom % 2);
          mreq_d[m].addr = {$urandom} & ~32'hF;
        end
      end
      bgnt = NB'($urandom);
    end
    @(posedge clk); #1;
    for (int m = 0; m < NM; m++) if (mgnt_q[m]) mreq[m] = 1'b0;
    // drain the request slices
    bgnt = '1;
    repeat (20) @(posedge clk);
    #1 mreq = '0;
    repeat (20) @(posedge clk);
    check(n_sent > 1000, $sformatf("enough traffic (%0d requests)", n_sent));
    check(n_sent == n_recv, $sformatf("every granted request reached a bank (%0d of %0d)", n_recv, n_sent));

    // responses pass through in the same cycle
    for (int i = 0; i < 500; i++) begin
      l15_rsp_t r0, r1;
      int s0, s1;
      @(negedge clk);
      s0 = $urandom % NM; s1 = $urandom % NM;
      r0.id = xfer_id_e'($urandom % 2); r0.data = {4{$urandom}};
      r1.id = (s0 == s1) ? xfer_id_e'(!r0.id) : xfer_id_e'($urandom % 2);
      r1.data = {4{$urandom}};
      brv = 2'b11; brsrc[0] = 3'(s0); brsrc[1] = 3'(s1); brsp[0] = r0; brsp[1] = r1;
      #1;
      if (s0 != s1) begin
        check(mrv[s0] && mrsp[s0] == r0 && !mdrop[s0], "bank 0 response in the same cycle");
        check(mrv[s1] && mrsp[s1] == r1 && !mdrop[s1], "bank 1 response in the same cycle");
        check($countones(mrv) == 2, "no other master sees a response");
      end else begin
        check(mrv[s0] && mdrop[s0], "collision: one response kept, one dropped");
        check(mrsp[s0].id == ID_REFILL, "collision keeps the refill");
      end
      @(negedge clk);
      brv = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
