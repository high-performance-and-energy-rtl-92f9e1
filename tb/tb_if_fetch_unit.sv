// Self-checking test of if_fetch_unit with a behavioural L1 cache (random
// grant, 1..3 cycle response). Checks the in-order word stream after boot,
// jumps and delayed conditional branches, the one-cycle branch delay, a
// branch that hits in the ring FIFO without a cache request, that
// fetch_req_o does not react combinationally to the response, and the
// sequential rate with a 1-cycle cache.
module tb_if_fetch_unit;
  import icache_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic fetch_en, jump, branch, ivalid, iready;
  addr_t boot, jump_addr, branch_addr, iaddr;
  word_t idata;
  logic freq, fgnt, frvalid;
  logic ovr_en = 1'b0, ovr_val = 1'b0;  // test override of the response valid
  addr_t faddr;
  line_t frdata;
  int checks = 0, failures = 0;

  if_fetch_unit dut (
    .clk_i(clk), .rst_ni(rst_n), .fetch_en_i(fetch_en), .boot_addr_i(boot),
    .jump_i(jump), .jump_addr_i(jump_addr), .branch_i(branch), .branch_addr_i(branch_addr),
    .instr_valid_o(ivalid), .instr_addr_o(iaddr), .instr_rdata_o(idata), .instr_ready_i(iready),
    .fetch_req_o(freq), .fetch_addr_o(faddr), .fetch_gnt_i(fgnt),
    .fetch_rvalid_i(ovr_en ? ovr_val : frvalid), .fetch_rdata_i(frdata)
  );

  always #5 clk = ~clk;

  function automatic word_t wdata(addr_t a);
    return {a[15:0], ~a[15:0]};
  endfunction
  function automatic line_t ldata(addr_t la);
    line_t l;
    for (int k = 0; k < 4; k++) l[32*k +: 32] = wdata(la + 4*k);
    return l;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------------------------------------------- behavioural cache
  int    gnt_pct = 70;
  int    max_lat = 3;
  int    lat_left;
  logic  busy;
  addr_t busy_addr;
  int    nreq;
  bit    gnt_rnd, rdy_rnd;
  always @(negedge clk) begin
    gnt_rnd = ($urandom % 100) < gnt_pct;
    rdy_rnd = ($urandom % 4) != 0;
  end
  assign fgnt = freq && !busy && gnt_rnd;
  always_ff @(posedge clk) begin
    if (!rst_n) begin busy <= 0; frvalid <= 0; frdata <= '0; nreq <= 0; end
    else begin
      frvalid <= 0;
      if (freq && fgnt) begin
        busy <= 1; busy_addr <= faddr; lat_left <= 1 + ($urandom % max_lat); nreq <= nreq + 1;
      end else if (busy) begin
        if (lat_left == 1) begin busy <= 0; frvalid <= 1; frdata <= ldata(busy_addr); end
        else lat_left <= lat_left - 1;
      end
    end
  end
  // frvalid is registered above: it rises one cycle after the last count
  // ------------------------------------------------------- consumer model
  addr_t exp_addr;
  int    popped;
  bit    consume = 1;
  always @(posedge clk) begin
    if (rst_n && ivalid && iready && !jump && !dut.br_q) begin
      check(iaddr == exp_addr, $sformatf("word address %h, expected %h", iaddr, exp_addr));
      check(idata == wdata(iaddr), "word data");
      exp_addr <= exp_addr + 4;
      popped++;
    end
  end
  assign iready = consume && rdy_rnd;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_words(int n);
    int start;
    start = popped;
    while (popped < start + n) @(posedge clk);
  endtask

  initial begin
    int t0, nr0;
    fetch_en = 0; boot = 32'h1C00_0080; jump = 0; branch = 0; jump_addr = '0; branch_addr = '0;
    popped = 0;
    exp_addr = 32'h1C00_0080;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); fetch_en = 1;
    wait_words(40);

    // response does not reach fetch_req combinationally
    begin
      logic r0, r1;
      @(negedge clk);
      ovr_en = 1'b1; ovr_val = 1'b0; #1 r0 = freq;
      ovr_val = 1'b1; #1 r1 = freq;
      ovr_en = 1'b0; #1;
      check(r0 == r1, "fetch_req independent of fetch_rvalid");
    end

    // jumps to random targets
    for (int i = 0; i < 30; i++) begin
      addr_t t;
      @(negedge clk);
      t = 32'h1C00_0000 + (($urandom % 1024) << 2);
      consume = 0; jump = 1; jump_addr = t;
      @(negedge clk); jump = 0; exp_addr = t; consume = 1;
      wait_words(1 + $urandom % 12);
    end

    // conditional branches: take effect one cycle late
    for (int i = 0; i < 30; i++) begin
      addr_t t, head_before;
      @(negedge clk);
      t = 32'h1C00_4000 + (($urandom % 1024) << 2);
      consume = 0; branch = 1; branch_addr = t;
      @(negedge clk); branch = 0;
      head_before = iaddr;
      check(dut.br_q, "branch registered for one cycle");
      @(negedge clk); exp_addr = t; consume = 1;
      wait_words(1 + $urandom % 12);
    end

    // short forward branch to a word already in the ring: no cache request
    gnt_pct = 100; max_lat = 1;
    @(negedge clk); consume = 0;
    repeat (8) @(negedge clk);           // ring fills to 3 words
    begin
      addr_t t;
      check(ivalid && dut.fifo_full, "ring full while the consumer stalls");
      t = iaddr + 8;                      // third useful word
      nr0 = nreq;
      branch = 1; branch_addr = t;
      @(negedge clk); branch = 0;
      @(negedge clk);
      check(ivalid && iaddr == t, "ring hit delivers target right after the redirect");
      check(nreq == nr0, "ring hit needs no cache request");
      exp_addr = t; consume = 1;
      wait_words(8);
    end

    // sequential rate with a 1-cycle cache and an always-ready consumer
    @(negedge clk); consume = 0; jump = 1; jump_addr = 32'h1C00_8000;
    @(negedge clk); jump = 0; exp_addr = 32'h1C00_8000;
    force iready = 1'b1;
    t0 = popped;
    repeat (200) @(posedge clk);
    release iready;
    $display("sequential rate: %0d words in 200 cycles", popped - t0);
    check(popped - t0 >= 100, "at least one word every two cycles in steady state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
