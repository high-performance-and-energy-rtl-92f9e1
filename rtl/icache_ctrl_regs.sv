// Software control and performance counters of the instruction cache.
//
// A small register file on a simple synchronous register port. It holds
// the per-core prefetch enable and counts the cache's events, so that
// software can switch the prefetcher per application and read hit, miss and
// prefetch statistics (from which miss rates are computed) without a probe.
//
// Each event counter adds, in every cycle, the number of cores (or banks)
// that raised the event. So it counts the event summed over the whole
// cluster. Counters are CNT_W bits wide and wrap around. Counting can be
// stopped, and all counters cleared at once, through the control register.
//
// Register map (word index on reg_addr_i, one 32-bit word each):
//   0  PF_EN    RW  bit c = prefetch enable of core c (reset: all enabled;
//                   NB_CORES up to 32)
//   1  CTRL     RW  bit 0 = counting enabled (reset 1); writing bit 1 = 1
//                   clears every counter (bit 1 reads 0)
//   2  L1_HIT        L1 hits (prefetch-buffer hits included)
//   3  L1_MISS       L1 misses
//   4  PF_ISSUE      prefetch requests sent to the L1.5
//   5  PF_HIT        core fetches served from a prefetch buffer
//   6  PF_WUP        misses that waited for an unfinished prefetch
//   7  PF_DROP       prefetch responses lost to a response collision
//   8  PF_DISCARD    prefetched lines thrown away after a branch
//   9  L15_HIT       L1.5 hits
//  10  L15_MISS      L1.5 misses
//  11  L15_MERGE     L1.5 misses merged into a pending refill
// Counters are read-only. Writes to them, and reads or writes of any other
// index, are ignored (reads return 0).
//
// Port timing: reg_req_i with reg_we_i, reg_addr_i and reg_wdata_i is
// always accepted. A write takes effect at the next rising edge. Read data
// appears on reg_rdata_o with reg_rvalid_o in the following cycle. A clear
// wins over the events of the same cycle.
//
// That the prefetcher can be enabled by software and that the cache holds
// hardware counters for its statistics comes from the design description.
// The register map, the reset values, the cluster-wide summing and the port
// are this design's choices.
module icache_ctrl_regs #(
  parameter int unsigned NB_CORES = 8,
  parameter int unsigned NB_BANKS = 2,
  parameter int unsigned CNT_W    = 32
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  // register port
  input  logic                reg_req_i,
  input  logic                reg_we_i,
  input  logic [3:0]          reg_addr_i,
  input  logic [31:0]         reg_wdata_i,
  output logic                reg_rvalid_o,
  output logic [31:0]         reg_rdata_o,
  // control out
  output logic [NB_CORES-1:0] pf_en_o,
  // events in (one-cycle strobes)
  input  logic [NB_CORES-1:0] ev_l1_hit_i,
  input  logic [NB_CORES-1:0] ev_l1_miss_i,
  input  logic [NB_CORES-1:0] ev_pf_issue_i,
  input  logic [NB_CORES-1:0] ev_pf_hit_i,
  input  logic [NB_CORES-1:0] ev_wup_i,
  input  logic [NB_CORES-1:0] ev_pf_drop_i,
  input  logic [NB_CORES-1:0] ev_pf_discard_i,
  input  logic [NB_BANKS-1:0] ev_l15_hit_i,
  input  logic [NB_BANKS-1:0] ev_l15_miss_i,
  input  logic [NB_BANKS-1:0] ev_l15_merge_i
);
  localparam int unsigned N_CNT = 10;
  localparam int unsigned FIRST = 2;  // register index of counter 0

  logic [CNT_W-1:0] cnt_q [N_CNT];
  logic [CNT_W-1:0] inc   [N_CNT];
  logic             cnt_en_q;
  logic             wr, clr;

  assign wr  = reg_req_i && reg_we_i;
  assign clr = wr && reg_addr_i == 4'd1 && reg_wdata_i[1];

  always_comb begin
    inc[0] = CNT_W'($countones(ev_l1_hit_i));
    inc[1] = CNT_W'($countones(ev_l1_miss_i));
    inc[2] = CNT_W'($countones(ev_pf_issue_i));
    inc[3] = CNT_W'($countones(ev_pf_hit_i));
    inc[4] = CNT_W'($countones(ev_wup_i));
    inc[5] = CNT_W'($countones(ev_pf_drop_i));
    inc[6] = CNT_W'($countones(ev_pf_discard_i));
    inc[7] = CNT_W'($countones(ev_l15_hit_i));
    inc[8] = CNT_W'($countones(ev_l15_miss_i));
    inc[9] = CNT_W'($countones(ev_l15_merge_i));
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      pf_en_o  <= '1;
      cnt_en_q <= 1'b1;
      for (int i = 0; i < N_CNT; i++) cnt_q[i] <= '0;
    end else begin
      if (wr && reg_addr_i == 4'd0) pf_en_o  <= reg_wdata_i[NB_CORES-1:0];
      if (wr && reg_addr_i == 4'd1) cnt_en_q <= reg_wdata_i[0];
      for (int i = 0; i < N_CNT; i++) begin
        if (clr)           cnt_q[i] <= '0;
        else if (cnt_en_q) cnt_q[i] <= cnt_q[i] + inc[i];
      end
    end
  end

  // registered read
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      reg_rvalid_o <= 1'b0;
      reg_rdata_o  <= '0;
    end else begin
      reg_rvalid_o <= reg_req_i && !reg_we_i;
      if (reg_req_i && !reg_we_i) begin
        reg_rdata_o <= '0;
        if (reg_addr_i == 4'd0) reg_rdata_o <= 32'(pf_en_o);
        else if (reg_addr_i == 4'd1) reg_rdata_o <= {31'd0, cnt_en_q};
        else if (reg_addr_i >= 4'(FIRST) && reg_addr_i < 4'(FIRST + N_CNT))
          reg_rdata_o <= 32'(cnt_q[reg_addr_i - 4'(FIRST)]);
      end
    end
  end

endmodule
