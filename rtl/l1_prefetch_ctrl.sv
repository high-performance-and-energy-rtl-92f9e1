// Sequential next-line prefetcher of one private L1 instruction cache.
//
// Every core fetch the L1 accepts (fetch_acc_i, line address fetch_addr_i)
// triggers, in the following cycle, a probe of the line after it on the
// L1's second tag read port (cache probe filtering). If prefetching is
// enabled (pf_en_i, set by software), the prefetcher is idle, the probe
// misses and that line is not the one the L1 is refilling, a prefetch request
// goes to the out-of-order arbiter in that same cycle. Triggers that arrive
// while a prefetch is under way are ignored: the prefetcher waits for the next
// core fetch to start again, which also re-aims it after a branch.
//
// The returned line is held in a one-line buffer. Before it is written into
// the cache it is compared with the line of the most recent core fetch: it
// is kept only if it is that line or the one after it; otherwise a branch has
// made it useless and it is dropped so that it cannot pollute the cache.
// Writes use the cache's single write port only when the refill path is not
// writing (wr_gnt_i). A prefetch response that the interconnect drops because
// it collided with a refill response (drop_i) ends the prefetch.
//
// The L1 fetch controller reads inflight_o/pf_addr_o to wait for an
// unfinished prefetch instead of refilling the same line, and buf_*_o and
// rsp_* to answer the core directly from the prefetched line.
//
// Timing: trigger at cycle t, probe and request at t+1, response at t+3 at
// the earliest (L1.5 hit), buffer valid at t+4, written at t+4 if the write
// port is free.
//
// Next-line prefetch of one 128-bit line, always-prefetch, probe filtering,
// software enable, the branch check before storing and refill priority on
// the write port follow the design description. The keep rule is read as
// "prefetch line equals the current fetch line or the current fetch line plus
// 16 bytes". One prefetch in flight and dropping new triggers meanwhile are
// this design's choices.
module l1_prefetch_ctrl (
  input  logic                clk_i,
  input  logic                rst_ni,
  input  logic                pf_en_i,
  // core fetch accepted by the L1
  input  logic                fetch_acc_i,
  input  icache_pkg::addr_t   fetch_addr_i,
  // probe on the second tag read port
  output icache_pkg::addr_t   probe_addr_o,
  input  logic                probe_hit_i,
  // line the refill path is fetching
  input  logic                refill_busy_i,
  input  icache_pkg::addr_t   refill_addr_i,
  // towards the arbiter
  output logic                req_o,
  output icache_pkg::addr_t   req_addr_o,
  input  logic                gnt_i,
  input  logic                rvalid_i,
  input  icache_pkg::line_t   rdata_i,
  input  logic                drop_i,
  // status for the fetch controller
  output logic                inflight_o,
  output icache_pkg::addr_t   pf_addr_o,
  output logic                buf_vld_o,
  output icache_pkg::line_t   buf_data_o,
  // cache write port (refill has priority)
  output logic                wr_req_o,
  input  logic                wr_gnt_i,
  // event counters' strobes
  output logic                issued_o,
  output logic                dropped_branch_o
);
  import icache_pkg::*;

  typedef enum logic [1:0] {PF_IDLE, PF_REQ, PF_WAIT, PF_HOLD} pf_state_e;

  pf_state_e state_q, state_d;
  logic      trig_q;
  addr_t     trig_addr_q;
  addr_t     pf_addr_q, pf_addr_d;
  line_t     buf_q;
  addr_t     cur_q;        // line of the latest accepted core fetch

  assign probe_addr_o = trig_addr_q;
  assign pf_addr_o    = pf_addr_q;
  assign inflight_o   = (state_q == PF_REQ) || (state_q == PF_WAIT);
  assign buf_vld_o    = (state_q == PF_HOLD);
  assign buf_data_o   = buf_q;

  logic start, keep;
  assign start = (state_q == PF_IDLE) && trig_q && pf_en_i && !probe_hit_i &&
                 !(refill_busy_i && refill_addr_i == trig_addr_q);
  assign keep  = (pf_addr_q == cur_q) || (pf_addr_q == cur_q + ADDR_W'(LINE_B));

  always_comb begin
    state_d          = state_q;
    pf_addr_d        = pf_addr_q;
    req_o            = 1'b0;
    req_addr_o       = pf_addr_q;
    wr_req_o         = 1'b0;
    issued_o         = 1'b0;
    dropped_branch_o = 1'b0;
    unique case (state_q)
      PF_IDLE: begin
        if (start) begin
          req_o      = 1'b1;
          req_addr_o = trig_addr_q;
          pf_addr_d  = trig_addr_q;
          issued_o   = 1'b1;
          state_d    = gnt_i ? PF_WAIT : PF_REQ;
        end
      end
      PF_REQ: begin
        req_o = 1'b1;
        if (gnt_i) state_d = PF_WAIT;
      end
      PF_WAIT: begin
        if (rvalid_i)    state_d = PF_HOLD;
        else if (drop_i) state_d = PF_IDLE;
      end
      PF_HOLD: begin
        if (!keep) begin
          dropped_branch_o = 1'b1;
          state_d          = PF_IDLE;
        end else begin
          wr_req_o = 1'b1;
          if (wr_gnt_i) state_d = PF_IDLE;
        end
      end
      default: state_d = PF_IDLE;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q     <= PF_IDLE;
      trig_q      <= 1'b0;
      trig_addr_q <= '0;
      pf_addr_q   <= '0;
      buf_q       <= '0;
      cur_q       <= '0;
    end else begin
      state_q     <= state_d;
      pf_addr_q   <= pf_addr_d;
      trig_q      <= fetch_acc_i;
      if (fetch_acc_i) begin
        trig_addr_q <= line_addr(fetch_addr_i) + ADDR_W'(LINE_B);
        cur_q       <= line_addr(fetch_addr_i);
      end
      if (state_q == PF_WAIT && rvalid_i) buf_q <= rdata_i;
    end
  end

  a_no_rsp_when_idle: assert property (@(posedge clk_i) disable iff (!rst_ni)
    rvalid_i |-> state_q == PF_WAIT);

endmodule
