// Self-checking test of l1_icache (with its prefetcher and arbiter) against
// a behavioural L1.5: fixed or random latency, out-of-order answers and
// optional dropping of prefetch responses. Checks data, the 1-cycle hit, the
// 3-cycle L1.5-hit miss, prefetch issue and prefetch hits, waiting for an
// unfinished prefetch (2 cycles, no refill sent), discarding a prefetched
// line after a branch, recovery from a dropped prefetch and a long random
// run.
module tb_l1_icache;
  import icache_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic pf_en;
  logic freq, fgnt, frvalid;
  addr_t faddr;
  line_t frdata;
  logic l15_req, l15_gnt, l15_rvalid, l15_drop;
  l15_req_t l15_req_data;
  l15_rsp_t l15_rsp;
  logic ev_hit, ev_miss, ev_pf_issue, ev_pf_hit, ev_wup, ev_pf_drop, ev_pf_discard;
  int checks = 0, failures = 0;

  l1_icache dut (
    .clk_i(clk), .rst_ni(rst_n), .pf_en_i(pf_en),
    .fetch_req_i(freq), .fetch_addr_i(faddr), .fetch_gnt_o(fgnt),
    .fetch_rvalid_o(frvalid), .fetch_rdata_o(frdata),
    .l15_req_o(l15_req), .l15_req_data_o(l15_req_data), .l15_gnt_i(l15_gnt),
    .l15_rvalid_i(l15_rvalid), .l15_rsp_i(l15_rsp), .l15_drop_i(l15_drop),
    .ev_hit_o(ev_hit), .ev_miss_o(ev_miss), .ev_pf_issue_o(ev_pf_issue),
    .ev_pf_hit_o(ev_pf_hit), .ev_wup_o(ev_wup), .ev_pf_drop_o(ev_pf_drop),
    .ev_pf_discard_o(ev_pf_discard)
  );

  always #5 clk = ~clk;

  function automatic line_t ldata(addr_t la);
    line_t l;
    for (int k = 0; k < 4; k++) l[32*k +: 32] = (la + 4*k) * 32'h9E37_79B1;
    return l;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ------------------------------------------------------ behavioural L1.5
  typedef struct { addr_t addr; xfer_id_e id; int due; } pend_t;
  pend_t pend[$];
  int  extra_lat = 0;      // added to the nominal 2 cycles
  int  pf_extra  = 0;      // further delay for prefetches only
  bit  rnd_lat   = 0;
  bit  drop_pf   = 0;      // drop every prefetch response
  int  n_refill_req = 0, n_pf_req = 0;
  assign l15_gnt = l15_req;
  always @(posedge clk) begin
    if (!rst_n) begin
      l15_rvalid <= 0; l15_drop <= 0; pend.delete();
    end else begin
      if (l15_req && l15_gnt) begin
        pend_t p;
        p.addr = l15_req_data.addr; p.id = l15_req_data.id;
        p.due  = cyc + 2 + extra_lat + (rnd_lat ? $urandom % 6 : 0) +
                 (p.id == ID_PREFETCH ? pf_extra : 0);
        pend.push_back(p);
        if (p.id == ID_REFILL) n_refill_req++; else n_pf_req++;
      end
      l15_rvalid <= 0; l15_drop <= 0;
      foreach (pend[i]) begin
        if (pend[i].due <= cyc + 1) begin
          if (drop_pf && pend[i].id == ID_PREFETCH) l15_drop <= 1;
          else begin
            l15_rvalid   <= 1;
            l15_rsp.id   <= pend[i].id;
            l15_rsp.data <= ldata(pend[i].addr);
          end
          pend.delete(i);
          break;
        end
      end
    end
  end

  // ------------------------------------------------------------ core model
  int n_wup = 0, n_pf_issue = 0, n_pf_hit = 0, n_discard = 0, n_drop = 0;
  always @(posedge clk) if (rst_n) begin
    n_wup      += ev_wup;
    n_pf_issue += ev_pf_issue;
    n_pf_hit   += ev_pf_hit;
    n_discard  += ev_pf_discard;
    n_drop     += ev_pf_drop;
  end

  // lat counts clock edges from the accepting edge to the edge that ends
  // the response cycle: a response in the next cycle is latency 1.
  task automatic fetch(addr_t a, output int lat);
    bit acc;
    @(negedge clk);
    freq = 1; faddr = a;
    do begin acc = fgnt; @(posedge clk); end while (!acc);
    #1 freq = 0;
    lat = 1;
    @(negedge clk);
    while (!frvalid) begin @(negedge clk); lat++; end
    check(frdata == ldata(line_addr(a)), $sformatf("data of line %h", a));
    @(posedge clk); #1;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, r0;
    freq = 0; faddr = '0; pf_en = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // cold miss, L1.5 hit: 3 cycles; then a 1-cycle hit
    fetch(32'h1000, lat);
    check(lat == 3, $sformatf("L1 miss / L1.5 hit latency %0d, expected 3", lat));
    fetch(32'h1004, lat);
    check(lat == 1, $sformatf("L1 hit latency %0d, expected 1", lat));

    // prefetch: fetch 0x1000 triggers 0x1010; later 0x1010 hits
    pf_en = 1;
    fetch(32'h1000, lat);
    repeat (6) @(posedge clk);
    check(n_pf_issue == 1, "one prefetch issued");
    r0 = n_refill_req;
    fetch(32'h1010, lat);
    check(lat == 1, $sformatf("prefetched line hits in %0d cycle(s)", lat));
    check(n_refill_req == r0, "no refill for a prefetched line");

    // wait for an unfinished prefetch: fetch the next line right away
    repeat (10) @(posedge clk);       // let the previous prefetch finish
    r0 = n_refill_req;
    pf_extra = 4;
    fetch(32'h3000, lat);   // miss; its fetch triggers a slow prefetch of 0x3010
    fetch(32'h3010, lat);
    pf_extra = 0;
    check(n_wup >= 1, "waited for the unfinished prefetch");
    check(n_refill_req == r0 + 1, "only the 0x3000 refill was sent");
    check(lat < 3 + 3 + 1, "WUP answers when the prefetch arrives");

    // branch while a prefetch is under way: the line is discarded
    r0 = n_discard;
    pf_extra = 8;
    fetch(32'h5000, lat);             // prefetch of 0x5010 starts, slow
    fetch(32'h1000, lat);             // branch back (hit)
    repeat (14) @(posedge clk);
    pf_extra = 0;
    check(n_discard == r0 + 1, "prefetched line discarded after a branch");
    r0 = n_refill_req;
    fetch(32'h5010, lat);
    check(n_refill_req == r0 + 1 && lat == 3, "discarded line is refilled on demand");

    // dropped prefetch responses: fetches still complete by refill
    drop_pf = 1;
    fetch(32'h2000, lat);
    fetch(32'h2010, lat);
    fetch(32'h2020, lat);
    repeat (5) @(posedge clk);
    drop_pf = 0;
    check(n_drop > 0, "prefetch responses were dropped");

    // random run: sequential streams with jumps, random latencies
    rnd_lat = 1;
    begin
      addr_t a;
      a = 32'h4000;
      for (int i = 0; i < 3000; i++) begin
        if ($urandom % 6 == 0) a = 32'h4000 + (($urandom % 256) << 4);
        else a = a + 16;
        pf_en = ($urandom % 8) != 0;
        drop_pf = ($urandom % 10) == 0;
        fetch(a + ($urandom % 4) * 4, lat);
      end
    end
    drop_pf = 0;
    $display("events: pf_issue=%0d pf_hit=%0d wup=%0d discard=%0d drop=%0d",
             n_pf_issue, n_pf_hit, n_wup, n_discard, n_drop);
    check(n_pf_hit > 0, "prefetch hits seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
