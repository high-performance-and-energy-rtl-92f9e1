// End-to-end test of hier_icache at its default size (8 cores, 512 B L1s,
// 2 x 2 KiB L1.5 banks) with eight core models and an L2 model answering
// after 15 to 20 cycles, in any order.
//
// It runs the six synthetic loop tests (loop bodies of 0.375, 0.75, 1.5, 3,
// 6 and 12 KiB of instructions, all cores executing the same code as an
// OpenMP parallel loop would), checks every word each core consumes, checks
// the 1-cycle L1 hit, the 3-cycle L1-miss/L1.5-hit latency and the
// 19-cycle cold miss (for a 15-cycle L2 round trip) on core 0's cache
// port, alternates the software prefetch enable between tests through the
// register port, counts each mechanism of the design (one that never
// happens is a failure) and compares the hardware event counters with its
// own counts, then clears them. A
// dropped prefetch response needs a collision that depends on the L2
// timing, so the 12 KiB loop is repeated (up to six times) until one
// happens.
//
// The loop sizes and the latencies come from the design description; the
// core and L2 models, the jitter and the memory contents are this test's.
module tb_hier_icache;
  import icache_pkg::*;

  localparam int NC = 8, NB = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fetch_en;
  logic [NC-1:0] jump, branch, ivalid, iready;
  logic reg_req = 1'b0, reg_we = 1'b0, reg_rvalid;
  logic [3:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  bit cnt_stop = 0;   // the test's own counting stops with the hardware's
  addr_t [NC-1:0] jump_addr, branch_addr, iaddr;
  word_t [NC-1:0] idata;
  logic l2_req, l2_gnt, l2_rvalid, l2_rready;
  addr_t l2_addr;
  logic [2:0] l2_id, l2_rid;
  line_t l2_rdata;
  logic [NC-1:0] ev_l1_hit, ev_l1_miss, ev_pf_issue, ev_pf_hit, ev_wup, ev_pf_drop, ev_pf_discard;
  logic [NB-1:0] ev_l15_hit, ev_l15_miss, ev_l15_merge;
  int checks = 0, failures = 0;

  hier_icache dut (
    .clk_i(clk), .rst_ni(rst_n), .fetch_en_i(fetch_en), .boot_addr_i(32'h1C00_8000),
    .reg_req_i(reg_req), .reg_we_i(reg_we), .reg_addr_i(reg_addr), .reg_wdata_i(reg_wdata),
    .reg_rvalid_o(reg_rvalid), .reg_rdata_o(reg_rdata),
    .jump_i(jump), .jump_addr_i(jump_addr),
    .branch_i(branch), .branch_addr_i(branch_addr),
    .instr_valid_o(ivalid), .instr_addr_o(iaddr), .instr_rdata_o(idata), .instr_ready_i(iready),
    .l2_req_o(l2_req), .l2_addr_o(l2_addr), .l2_id_o(l2_id), .l2_gnt_i(l2_gnt),
    .l2_rvalid_i(l2_rvalid), .l2_rdata_i(l2_rdata), .l2_rid_i(l2_rid), .l2_rready_o(l2_rready),
    .ev_l1_hit_o(ev_l1_hit), .ev_l1_miss_o(ev_l1_miss), .ev_pf_issue_o(ev_pf_issue),
    .ev_pf_hit_o(ev_pf_hit), .ev_wup_o(ev_wup), .ev_pf_drop_o(ev_pf_drop),
    .ev_pf_discard_o(ev_pf_discard),
    .ev_l15_hit_o(ev_l15_hit), .ev_l15_miss_o(ev_l15_miss), .ev_l15_merge_o(ev_l15_merge)
  );

  int n_l2;
  l2_mem_model #(.LAT(15), .JITTER(5), .ID_W(3)) i_l2 (
    .clk_i(clk), .rst_ni(rst_n), .req_i(l2_req), .addr_i(l2_addr), .id_i(l2_id),
    .gnt_o(l2_gnt), .rvalid_o(l2_rvalid), .rdata_o(l2_rdata), .rid_o(l2_rid),
    .rready_i(l2_rready), .n_req_o(n_l2)
  );

  logic [NC-1:0] start, done;
  addr_t base;
  int body, iters;
  int words [NC], mchecks [NC], mfails [NC];

  for (genvar c = 0; c < NC; c++) begin : g_core
    core_fetch_model i_core (
      .clk_i(clk), .rst_ni(rst_n), .start_i(start[c]), .base_i(base),
      .body_i(body), .iter_i(iters), .done_o(done[c]),
      .words_o(words[c]), .checks_o(mchecks[c]), .fails_o(mfails[c]),
      .jump_o(jump[c]), .jump_addr_o(jump_addr[c]),
      .branch_o(branch[c]), .branch_addr_o(branch_addr[c]),
      .instr_valid_i(ivalid[c]), .instr_addr_i(iaddr[c]), .instr_rdata_i(idata[c]),
      .instr_ready_o(iready[c])
    );
  end

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ------------------------------------------------------- register port
  task automatic reg_write(logic [3:0] a, logic [31:0] d);
    @(negedge clk);
    reg_req = 1; reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk);
    reg_req = 0; reg_we = 0;
  endtask

  task automatic reg_read(logic [3:0] a, output logic [31:0] d);
    @(negedge clk);
    reg_req = 1; reg_we = 0; reg_addr = a;
    @(negedge clk);
    reg_req = 0;
    check(reg_rvalid, "register read answered in the next cycle");
    d = reg_rdata;
  endtask

  // ------------------------------------------------------- event counting
  typedef enum int {
    E_L1_HIT, E_L1_MISS, E_PF_ISSUE, E_PF_HIT, E_WUP, E_PF_DROP, E_PF_DISCARD,
    E_L15_HIT, E_L15_MISS, E_L15_MERGE, E_RING_HIT, E_BR_DELAY, E_BANK_CONFLICT,
    E_L2_REQ, E_NUM
  } ev_e;
  string ev_name [E_NUM] = '{"L1 hit", "L1 miss", "prefetch issued", "prefetch-buffer hit",
    "wait for unfinished prefetch", "prefetch response dropped", "prefetch discarded on branch",
    "L1.5 hit", "L1.5 miss", "L1.5 miss merged", "ring FIFO redirect hit",
    "delayed conditional branch", "bank conflict stall", "L2 refill"};
  longint ev_cnt [E_NUM];

  always @(posedge clk) if (rst_n && !cnt_stop) begin
    ev_cnt[E_L1_HIT]      += $countones(ev_l1_hit);
    ev_cnt[E_L1_MISS]     += $countones(ev_l1_miss);
    ev_cnt[E_PF_ISSUE]    += $countones(ev_pf_issue);
    ev_cnt[E_PF_HIT]      += $countones(ev_pf_hit);
    ev_cnt[E_WUP]         += $countones(ev_wup);
    ev_cnt[E_PF_DROP]     += $countones(ev_pf_drop);
    ev_cnt[E_PF_DISCARD]  += $countones(ev_pf_discard);
    ev_cnt[E_L15_HIT]     += $countones(ev_l15_hit);
    ev_cnt[E_L15_MISS]    += $countones(ev_l15_miss);
    ev_cnt[E_L15_MERGE]   += $countones(ev_l15_merge);
    ev_cnt[E_L2_REQ]      += (l2_req && l2_gnt);
    ev_cnt[E_BANK_CONFLICT] += $countones(dut.m_req & ~dut.m_gnt);
  end
  for (genvar c = 0; c < NC; c++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      ev_cnt[E_RING_HIT] += (dut.g_core[c].i_if.redir && dut.g_core[c].i_if.fifo_hit);
      ev_cnt[E_BR_DELAY] += dut.g_core[c].i_if.br_q;
    end
  end

  // ------------------------------------- latency on core 0's cache port
  int lat_hist [8];
  int lat_l2_min = 1000;  // shortest core-0 fetch that went to L2
  int lat_first = 0;      // the cold boot fetch of core 0
  int l2_req_cyc = -1, l2_rt = 0;  // first L2 request and its round trip
  logic [2:0] l2_first_id;
  always @(posedge clk) begin
    if (rst_n && l2_req && l2_gnt && l2_req_cyc < 0) begin
      l2_req_cyc  <= cyc;
      l2_first_id <= l2_id;
    end
    if (rst_n && l2_req_cyc >= 0 && l2_rvalid && l2_rready && l2_rid == l2_first_id && l2_rt == 0)
      l2_rt <= cyc - l2_req_cyc;
  end
  int acc_cyc, cyc;
  bit pend_acc, pend_hit;
  always @(posedge clk) begin
    if (!rst_n) begin cyc <= 0; pend_acc <= 0; end
    else begin
      cyc <= cyc + 1;
      if (dut.f_rvalid[0] && pend_acc) begin
        int l;
        l = cyc - acc_cyc;
        lat_hist[l > 7 ? 7 : l]++;
        if (l > 7 && l < lat_l2_min) lat_l2_min <= l;
        if (lat_first == 0) lat_first <= l;
        if (pend_hit) check(l == 1, "L1 hit answered in the next cycle");
        pend_acc <= 0;
      end
      if (dut.f_req[0] && dut.f_gnt[0]) begin
        pend_acc <= 1; acc_cyc <= cyc; pend_hit <= ev_l1_hit[0];
      end
    end
  end

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sizes [6] = '{96, 192, 384, 768, 1536, 3072};   // words: 0.375 .. 12 KiB

  initial begin
    fetch_en = 0; start = '0; base = 32'h1C00_8000; body = 96; iters = 1;
    foreach (ev_cnt[e]) ev_cnt[e] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    begin
      logic [31:0] d;
      reg_read(4'd0, d);
      check(d == 32'hFF, "prefetch enabled in every core after reset");
    end
    @(negedge clk); fetch_en = 1;
    repeat (4) @(negedge clk);

    foreach (sizes[k]) begin
      int t0, w0, l1m0, l1h0;
      body  = sizes[k];
      iters = (4096 / body < 2) ? 2 : 4096 / body;
      base  = 32'h1C00_8000 + k * 32'h4000;
      // software enable switched between tests
      reg_write(4'd0, (k % 2 == 0) ? 32'hFF : 32'h0F);
      begin
        logic [31:0] d;
        reg_read(4'd0, d);
        check(d == ((k % 2 == 0) ? 32'hFF : 32'h0F), "prefetch enable register written");
      end
      t0 = cyc; w0 = 0;
      foreach (words[c]) w0 += words[c];
      l1m0 = int'(ev_cnt[E_L1_MISS]); l1h0 = int'(ev_cnt[E_L1_HIT]);
      // staggered start, as cores leave a barrier at slightly different times
      for (int c = 0; c < NC; c++) begin
        start[c] = 1; @(negedge clk); start[c] = 0;
      end
      while (done != '1 && cyc - t0 < 2000000) @(negedge clk);
      check(done == '1, $sformatf("all cores finished the %0d-word loop", body));
      begin
        int w;
        w = 0;
        foreach (words[c]) w += words[c];
        $display("synthetic %5.3f KiB: %0d cycles, %0d words, %0.2f words/cycle/core, L1 miss rate %0.3f, pf %s",
                 body * 4 / 1024.0, cyc - t0, w - w0, real'(w - w0) / (cyc - t0) / NC,
                 real'(int'(ev_cnt[E_L1_MISS]) - l1m0) /
                 real'(int'(ev_cnt[E_L1_MISS]) - l1m0 + int'(ev_cnt[E_L1_HIT]) - l1h0),
                 (k % 2 == 0) ? "on all cores" : "on cores 0-3");
      end
      repeat (20) @(negedge clk);
    end

    // A dropped prefetch response needs a refill and a prefetch answer for
    // the same core to meet in one cycle, which depends on the L2 timing.
    // If the tests above saw none, repeat the 12 KiB loop with prefetch on.
    for (int r = 0; r < 6 && ev_cnt[E_PF_DROP] == 0; r++) begin
      int t0;
      body = 3072; iters = 2;
      reg_write(4'd0, 32'hFF);
      base = 32'h1C04_0000 + r * 32'h4000;
      t0 = cyc;
      for (int c = 0; c < NC; c++) begin
        start[c] = 1; @(negedge clk); start[c] = 0;
      end
      while (done != '1 && cyc - t0 < 2000000) @(negedge clk);
      check(done == '1, "all cores finished the extra 12 KiB loop");
      $display("extra 12 KiB loop %0d: %0d cycles", r, cyc - t0);
      repeat (20) @(negedge clk);
    end

    // hardware counters against the test's own counts: stop both together
    @(negedge clk);
    reg_req = 1; reg_we = 1; reg_addr = 4'd1; reg_wdata = 32'd0;
    @(posedge clk); #1 cnt_stop = 1;
    @(negedge clk); reg_req = 0; reg_we = 0;
    repeat (3) @(negedge clk);
    for (int e = 0; e <= int'(E_L15_MERGE); e++) begin
      logic [31:0] d;
      reg_read(4'(2 + e), d);
      check(d == 32'(ev_cnt[e]), $sformatf("counter '%s' reads %0d, expected %0d", ev_name[e], d, ev_cnt[e]));
    end
    // clear
    reg_write(4'd1, 32'd2);
    for (int e = 0; e <= int'(E_L15_MERGE); e++) begin
      logic [31:0] d;
      reg_read(4'(2 + e), d);
      check(d == 0, "counters cleared");
    end

    foreach (mchecks[c]) begin
      checks   += mchecks[c];
      failures += mfails[c];
    end
    $display("core 0 fetch latency histogram (cycles 1..7+): %0d %0d %0d %0d %0d %0d %0d",
             lat_hist[1], lat_hist[2], lat_hist[3], lat_hist[4], lat_hist[5], lat_hist[6], lat_hist[7]);
    check(lat_hist[1] > 0, "1-cycle L1 hits seen");
    check(lat_hist[3] > 0, "3-cycle L1 miss / L1.5 hit seen");
    $display("shortest core 0 fetch through L2: %0d cycles, cold boot fetch: %0d cycles, its L2 round trip: %0d cycles",
             lat_l2_min, lat_first, l2_rt);
    check(lat_first == l2_rt + 4, "L1 and L1.5 miss costs the L2 round trip plus 4 cycles (19 for a 15-cycle L2)");
    for (int e = 0; e < E_NUM; e++) begin
      $display("  %-30s %0d", ev_name[e], ev_cnt[e]);
      check(ev_cnt[e] > 0, $sformatf("mechanism '%s' happened", ev_name[e]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
