// Self-checking test of icache_ctrl_regs (8 cores, 2 banks): reset values,
// the prefetch enable register, read timing (data one cycle after the
// request), random event strobes summed across cores and banks against a
// reference count, stopping and restarting the counters, clearing them (a
// clear wins over events in the same cycle), and reads of unused indexes.
module tb_icache_ctrl_regs;
  localparam int NC = 8, NB = 2, N_CNT = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req = 1'b0, we = 1'b0, rvalid;
  logic [3:0]  addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [NC-1:0] pf_en;
  logic [NC-1:0] ev_c [7];
  logic [NB-1:0] ev_b [3];
  int checks = 0, failures = 0;
  longint ref_cnt [N_CNT];
  bit counting = 1;

  icache_ctrl_regs #(.NB_CORES(NC), .NB_BANKS(NB)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .reg_req_i(req), .reg_we_i(we), .reg_addr_i(addr), .reg_wdata_i(wdata),
    .reg_rvalid_o(rvalid), .reg_rdata_o(rdata),
    .pf_en_o(pf_en),
    .ev_l1_hit_i(ev_c[0]), .ev_l1_miss_i(ev_c[1]), .ev_pf_issue_i(ev_c[2]),
    .ev_pf_hit_i(ev_c[3]), .ev_wup_i(ev_c[4]), .ev_pf_drop_i(ev_c[5]),
    .ev_pf_discard_i(ev_c[6]),
    .ev_l15_hit_i(ev_b[0]), .ev_l15_miss_i(ev_b[1]), .ev_l15_merge_i(ev_b[2])
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

  // reference: events sampled at each rising edge while counting is on
  always @(posedge clk) if (rst_n && counting) begin
    for (int i = 0; i < 7; i++) ref_cnt[i]     += $countones(ev_c[i]);
    for (int i = 0; i < 3; i++) ref_cnt[7 + i] += $countones(ev_b[i]);
  end

  bit ev_on = 0;
  always @(negedge clk) begin
    for (int i = 0; i < 7; i++) ev_c[i] <= ev_on ? NC'($urandom) : '0;
    for (int i = 0; i < 3; i++) ev_b[i] <= ev_on ? NB'($urandom) : '0;
  end

  task automatic rd(logic [3:0] a, output logic [31:0] d);
    @(negedge clk);
    req = 1; we = 0; addr = a;
    @(negedge clk);
    req = 0;
    check(rvalid, "read answered one cycle after the request");
    d = rdata;
  endtask

  task automatic wr(logic [3:0] a, logic [31:0] d);
    @(negedge clk);
    req = 1; we = 1; addr = a; wdata = d;
    @(negedge clk);
    req = 0; we = 0;
    #1 check(!rvalid, "no read data for a write");
  endtask

  task automatic check_counters(string when);
    for (int i = 0; i < N_CNT; i++) begin
      logic [31:0] d;
      rd(4'(2 + i), d);
      check(d == 32'(ref_cnt[i]), $sformatf("%s: counter %0d reads %0d, expected %0d", when, i, d, ref_cnt[i]));
    end
  endtask

  initial begin
    logic [31:0] d;
    foreach (ref_cnt[i]) ref_cnt[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // reset values
    check(pf_en == '1, "prefetch enabled in every core after reset");
    rd(4'd0, d); check(d == 32'h0000_00FF, "PF_EN reads all ones");
    rd(4'd1, d); check(d == 32'h1, "counting enabled after reset");
    check_counters("after reset");

    // prefetch enable register
    for (int i = 0; i < 20; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      wr(4'd0, {24'hABCDEF, v});
      check(pf_en == v, "pf_en_o follows the register");
      rd(4'd0, d); check(d == {24'd0, v}, "PF_EN reads back");
    end
    wr(4'd0, 32'hFF);

    // random events, counters against the reference
    ev_on = 1;
    repeat (500) @(negedge clk);
    ev_on = 0;
    repeat (2) @(negedge clk);
    check_counters("after random events");

    // counting stopped: events are ignored
    wr(4'd1, 32'd0);
    counting = 0;
    ev_on = 1;
    repeat (100) @(negedge clk);
    ev_on = 0;
    repeat (2) @(negedge clk);
    check_counters("while stopped");
    rd(4'd1, d); check(d == 32'h0, "CTRL reads counting off");

    // restart counting
    @(negedge clk);
    req = 1; we = 1; addr = 4'd1; wdata = 32'd1;
    @(posedge clk); #1 counting = 1;
    @(negedge clk); req = 0; we = 0;
    ev_on = 1;
    repeat (200) @(negedge clk);
    ev_on = 0;
    repeat (2) @(negedge clk);
    check_counters("after restart");

    // clear while events arrive: the clear wins in its own cycle
    ev_on = 1;
    repeat (10) @(negedge clk);
    req = 1; we = 1; addr = 4'd1; wdata = 32'd3;   // clear, keep counting
    @(posedge clk); #1 foreach (ref_cnt[i]) ref_cnt[i] = 0;
    @(negedge clk); req = 0; we = 0;
    repeat (50) @(negedge clk);
    ev_on = 0;
    repeat (2) @(negedge clk);
    check_counters("after a clear under traffic");
    rd(4'd1, d); check(d == 32'h1, "clear bit reads back as 0");

    // writes to counters and unused indexes are ignored, unused read 0
    wr(4'd2, 32'h1234_5678);
    check_counters("after a write to a counter");
    rd(4'd12, d); check(d == 0, "unused index reads 0");
    rd(4'd15, d); check(d == 0, "unused index reads 0");
    check(pf_en == '1, "PF_EN unchanged by other writes");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
