// Self-checking test of fetch_ring_fifo: ordering, the DEPTH-1 full rule,
// short-branch hits that re-point the read pointer, clearing on a missed
// redirect, and a random push/pop run against a reference queue.
module tb_fetch_ring_fifo;
  import icache_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push, pop, redir, hit, valid, full;
  addr_t push_addr, redir_addr, head_addr;
  word_t push_data, head_data;
  int checks = 0, failures = 0;

  fetch_ring_fifo #(.DEPTH(4)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .push_i(push), .push_addr_i(push_addr), .push_data_i(push_data),
    .pop_i(pop), .redirect_i(redir), .redirect_addr_i(redir_addr),
    .redirect_hit_o(hit), .valid_o(valid), .addr_o(head_addr),
    .data_o(head_data), .full_o(full)
  );

  always #5 clk = ~clk;

  function automatic word_t wdata(addr_t a);
    return a ^ 32'hC0DE_0000;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic idle();
    push = 0; pop = 0; redir = 0;
  endtask

  task automatic do_push(addr_t a);
    push = 1; push_addr = a; push_data = wdata(a);
    @(posedge clk); #1; idle();
  endtask

  task automatic do_pop();
    pop = 1; @(posedge clk); #1; idle();
  endtask

  task automatic do_redirect(addr_t a, output bit h);
    redir = 1; redir_addr = a; #1 h = hit;
    @(posedge clk); #1; idle();
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit h;
    addr_t q[$];
    addr_t next;
    idle(); push_addr = '0; push_data = '0; redir_addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(!valid && !full, "empty after reset");

    // fill: full at DEPTH-1 = 3 words
    do_push(32'h100); do_push(32'h104);
    check(!full, "not full with 2");
    do_push(32'h108);
    check(full, "full with 3 useful words");
    do_push(32'h10C);   // must be refused
    check(valid && head_addr == 32'h100 && head_data == wdata(32'h100), "head is first word");
    do_pop(); check(head_addr == 32'h104, "second word");
    do_pop(); check(head_addr == 32'h108, "third word, 4th push refused");
    check(!full, "not full after two pops");

    // short backward branch to 0x100 hits in the ring
    do_redirect(32'h100, h);
    check(h, "redirect to 0x100 hits");
    check(valid && head_addr == 32'h100 && head_data == wdata(32'h100), "replay from 0x100");
    check(full, "three useful words again");
    do_pop(); do_pop(); do_pop();
    check(!valid, "empty after replay");
    do_push(32'h10C); do_push(32'h110);
    // 0x110 lands in the slot that held 0x100
    do_redirect(32'h100, h);
    check(!h, "overwritten word does not hit");
    check(!valid, "missed redirect clears the ring");
    do_redirect(32'h10C, h);
    check(!h, "cleared ring holds nothing");

    // random run against a queue (sequential addresses only)
    next = 32'h2000;
    for (int i = 0; i < 2000; i++) begin
      bit p, o;
      p = ($urandom % 3) != 0;
      o = ($urandom % 2) != 0;
      push = p; push_addr = next; push_data = wdata(next); pop = o;
      #1;
      if (o && q.size() > 0)
        check(valid && head_addr == q[0] && head_data == wdata(q[0]), "random head");
      else if (q.size() == 0)
        check(!valid, "random empty");
      check(full == (q.size() >= 3), "random full flag");
      @(posedge clk);
      begin
        int sz;
        sz = q.size();
        if (p && sz < 3) begin q.push_back(next); next += 4; end
        if (o && sz > 0) void'(q.pop_front());
      end
      #1; idle();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
