// Self-checking test of l15_bank (2 KiB, 4-way, bank 0 of 2) with a
// behavioural L2 (out-of-order answers after 15+ cycles): 1-cycle hit,
// refill on a miss answered one cycle after the L2 line, merging of
// several requesters of one missing line into a single L2 request, hits served while a miss is pending, refusal when the
// miss table is full, and a random run where every accepted request must get
// exactly one answer with the right line and ID.
module tb_l15_bank;
  import icache_pkg::*;

  localparam int NM = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req, gnt, rvalid;
  l15_req_t req_d;
  l15_rsp_t rsp;
  logic [2:0] src, rsrc;
  logic l2_req, l2_gnt, l2_rvalid, l2_rready;
  addr_t l2_addr;
  logic [1:0] l2_tag, l2_rtag;
  line_t l2_rdata;
  logic ev_hit, ev_miss, ev_merge;
  int checks = 0, failures = 0;

  l15_bank dut (
    .clk_i(clk), .rst_ni(rst_n),
    .req_i(req), .req_data_i(req_d), .src_i(src), .gnt_o(gnt),
    .rvalid_o(rvalid), .rsp_o(rsp), .rsrc_o(rsrc),
    .l2_req_o(l2_req), .l2_addr_o(l2_addr), .l2_tag_o(l2_tag), .l2_gnt_i(l2_gnt),
    .l2_rvalid_i(l2_rvalid), .l2_rdata_i(l2_rdata), .l2_rtag_i(l2_rtag), .l2_rready_o(l2_rready),
    .ev_hit_o(ev_hit), .ev_miss_o(ev_miss), .ev_merge_o(ev_merge)
  );

  always #5 clk = ~clk;

  function automatic line_t ldata(addr_t la);
    line_t l;
    for (int k = 0; k < 4; k++) l[32*k +: 32] = (la + 4*k) ^ 32'h5A5A_0000;
    return l;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ------------------------------------------------------------ L2 model
  typedef struct { addr_t addr; logic [1:0] tag; int due; } l2p_t;
  l2p_t l2q[$];
  int l2_lat = 15, l2_rnd = 0, n_l2 = 0;
  bit l2_hold = 0;
  assign l2_gnt = l2_req;
  always @(posedge clk) begin
    if (!rst_n) begin l2_rvalid <= 0; l2q.delete(); end
    else begin
      if (l2_rvalid && l2_rready) l2_rvalid <= 0;
      if (l2_req && l2_gnt) begin
        l2p_t p;
        p.addr = l2_addr; p.tag = l2_tag; p.due = cyc + l2_lat + (l2_rnd ? $urandom % 10 : 0);
        l2q.push_back(p);
        n_l2++;
      end
      if (!l2_hold && (!l2_rvalid || l2_rready)) begin
        foreach (l2q[i]) if (l2q[i].due <= cyc) begin
          l2_rvalid <= 1; l2_rdata <= ldata(l2q[i].addr); l2_rtag <= l2q[i].tag;
          l2q.delete(i);
          break;
        end
      end
    end
  end

  // ------------------------------------------------------ response checker
  addr_t outst [NM][2];
  bit    busy  [NM][2];
  int    n_rsp = 0;
  always @(posedge clk) if (rst_n && rvalid) begin
    check(busy[rsrc][rsp.id], "response to a waiting requester");
    check(rsp.data == ldata(outst[rsrc][rsp.id]), "response line");
    busy[rsrc][rsp.id] = 0;
    n_rsp++;
  end

  // issue one request and wait for its grant
  task automatic send(int s, xfer_id_e id, addr_t a);
    @(negedge clk);
    req = 1; src = 3'(s); req_d.id = id; req_d.addr = a;
    #1 while (!gnt) begin @(negedge clk); #1; end
    outst[s][id] = a; busy[s][id] = 1;
    @(posedge clk); #1 req = 0;
  endtask

  task automatic wait_idle();
    int guard;
    guard = 0;
    while (guard < 500) begin
      bit any;
      any = 0;
      foreach (busy[s, i]) any |= busy[s][i];
      if (!any) break;
      @(posedge clk); guard++;
    end
  endtask

  // the first requester of a line from L2 is answered in the next cycle
  logic l2_take_q = 1'b0;
  always @(posedge clk) begin
    if (rst_n && l2_take_q) check(rvalid, "miss answered one cycle after the L2 line");
    l2_take_q <= rst_n && l2_rvalid && l2_rready;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, n0;
    req = 0; src = '0; req_d = '0;
    foreach (busy[s, i]) busy[s][i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // cold miss then refill
    t0 = cyc;
    send(0, ID_REFILL, 32'h0000_1000);
    wait_idle();
    check(n_l2 == 1, "one L2 refill for the cold miss");
    check(cyc - t0 >= 15, "miss answered after the L2 latency");

    // hit: answer in the cycle after the grant
    @(negedge clk);
    req = 1; src = 3; req_d.id = ID_PREFETCH; req_d.addr = 32'h0000_1000;
    #1 check(gnt, "hit granted at once");
    outst[3][1] = 32'h0000_1000; busy[3][1] = 1;
    @(negedge clk); req = 0;
    check(rvalid && rsrc == 3 && rsp.id == ID_PREFETCH, "hit answered in the next cycle");

    // merging: 5 requesters of one missing line, one L2 request
    n0 = n_l2;
    l2_hold = 1;
    for (int s = 0; s < 5; s++) send(s, ID_REFILL, 32'h0000_2040);
    check(n_l2 == n0 + 1, "five misses to one line make one L2 request");
    // a hit is served while the miss waits
    send(6, ID_REFILL, 32'h0000_1000);
    @(posedge clk); #1;
    check(!busy[6][0], "hit served under a pending miss");
    l2_hold = 0;
    wait_idle();
    check(n_rsp >= 8, "all merged requesters answered");

    // miss table full: 4 pending lines, the 5th is refused
    l2_hold = 1;
    for (int i = 0; i < 4; i++) send(i, ID_REFILL, 32'h0001_0000 + i * 32);
    @(negedge clk);
    req = 1; src = 5; req_d.id = ID_REFILL; req_d.addr = 32'h0002_0000;
    #1 check(!gnt, "fifth pending line refused");
    @(negedge clk); req = 0;
    l2_hold = 0;
    wait_idle();

    // random run
    l2_rnd = 1;
    for (int i = 0; i < 4000; i++) begin
      int s, id;
      addr_t a;
      s = $urandom % NM; id = $urandom % 2;
      a = ({$urandom} % 320) * 32;         // 10 KiB of lines for this bank
      if (!busy[s][id]) send(s, xfer_id_e'(id), a);
      else @(posedge clk);
    end
    wait_idle();
    begin
      bit any;
      any = 0;
      foreach (busy[s, i]) any |= busy[s][i];
      check(!any, "every accepted request answered");
    end
    $display("responses=%0d L2 refills=%0d", n_rsp, n_l2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
