// Private L1 instruction cache of one core, with next-line prefetch.
//
// 512 bytes, 4-way set-associative, 128-bit lines (8 sets by default), tag
// and data held in standard-cell-memory style arrays. The tag store has two
// read ports: port 0 serves the core's fetch lookup, port 1 the prefetcher's
// probe, so both look up in parallel.
//
// Core side: fetch_req_i/fetch_addr_i with fetch_gnt_o (granted whenever the
// controller is ready), response on fetch_rvalid_o/fetch_rdata_o with the
// whole 128-bit line. A hit answers in the next cycle. A miss moves to the
// refill state: the line address goes to the L1.5 through l1_ooo_arbiter
// with ID 0 and the line is returned to the core in the cycle it arrives,
// while it is written into the arrays (3 cycles in all when the L1.5 hits).
// A line still sitting in the prefetch buffer counts as a hit. If the missing
// line is the one the prefetcher is fetching, no refill is sent: the
// controller waits for the unfinished prefetch and answers from its response.
// If that prefetch response is lost (dropped by the interconnect) the normal
// refill is sent instead.
//
// The write port of the arrays is shared: the refill writes first, the
// prefetcher writes its buffered line when the refill is not writing. The
// victim way comes from a free-running 8-bit LFSR (pseudo-random
// replacement).
//
// L1.5 side: one request port (l15_req_o, l15_req_data_o with the ID in the
// MSB, l15_gnt_i) and one response port (l15_rvalid_i, l15_rsp_i,
// l15_drop_i).
//
// Size, associativity, line width, 1-cycle hit, refill from the L1.5, the
// dual-read-port tag store, the refill-priority write multiplexer, waiting
// for an unfinished prefetch and pseudo-random replacement follow the design
// description; the LFSR polynomial and the state machine are this design's.
module l1_icache #(
  parameter int unsigned SIZE_B = 512,
  parameter int unsigned WAYS   = 4
) (
  input  logic                  clk_i,
  input  logic                  rst_ni,
  input  logic                  pf_en_i,
  // core fetch port
  input  logic                  fetch_req_i,
  input  icache_pkg::addr_t     fetch_addr_i,
  output logic                  fetch_gnt_o,
  output logic                  fetch_rvalid_o,
  output icache_pkg::line_t     fetch_rdata_o,
  // port towards the L1.5
  output logic                  l15_req_o,
  output icache_pkg::l15_req_t  l15_req_data_o,
  input  logic                  l15_gnt_i,
  input  logic                  l15_rvalid_i,
  input  icache_pkg::l15_rsp_t  l15_rsp_i,
  input  logic                  l15_drop_i,
  // event strobes
  output logic                  ev_hit_o,
  output logic                  ev_miss_o,
  output logic                  ev_pf_issue_o,
  output logic                  ev_pf_hit_o,
  output logic                  ev_wup_o,
  output logic                  ev_pf_drop_o,
  output logic                  ev_pf_discard_o
);
  import icache_pkg::*;

  localparam int unsigned SETS  = SIZE_B / LINE_B / WAYS;
  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned TAG_W = ADDR_W - OFFS_W - IDX_W;

  typedef enum logic [1:0] {S_READY, S_MISS, S_REFILL, S_WUP} state_e;
  state_e state_q, state_d;

  addr_t miss_q;
  logic  rsp_vld_q;
  line_t rsp_q;
  logic [7:0] lfsr_q;

  function automatic logic [IDX_W-1:0] idx_of(addr_t a);
    return a[OFFS_W +: IDX_W];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(addr_t a);
    return a[ADDR_W-1 -: TAG_W];
  endfunction

  // ---------------------------------------------------------------- arrays
  logic [1:0][IDX_W-1:0]             rd_idx;
  logic [1:0][WAYS-1:0][TAG_W-1:0]   rd_tag;
  logic [1:0][WAYS-1:0]              rd_vld;
  logic                              t_we;
  logic [IDX_W-1:0]                  w_idx;
  logic [WAY_W-1:0]                  w_way;
  logic [TAG_W-1:0]                  w_tag;
  line_t                             w_data;
  logic [WAY_W-1:0]                  hit_way;
  line_t                             arr_rdata;

  addr_t probe_addr;
  assign rd_idx[0] = idx_of(fetch_addr_i);
  assign rd_idx[1] = idx_of(probe_addr);

  scm_tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W), .NRD(2)) i_tag (
    .clk_i, .rst_ni,
    .rd_idx_i (rd_idx),
    .rd_tag_o (rd_tag),
    .rd_vld_o (rd_vld),
    .we_i     (t_we),
    .w_idx_i  (w_idx),
    .w_way_i  (w_way),
    .w_tag_i  (w_tag)
  );

  scm_data_array #(.SETS(SETS), .WAYS(WAYS), .WIDTH(LINE_W)) i_data (
    .clk_i,
    .rd_idx_i  (rd_idx[0]),
    .rd_way_i  (hit_way),
    .rd_data_o (arr_rdata),
    .we_i      (t_we),
    .w_idx_i   (w_idx),
    .w_way_i   (w_way),
    .w_data_i  (w_data)
  );

  logic tag_hit, probe_hit;
  always_comb begin
    tag_hit   = 1'b0;
    hit_way   = '0;
    probe_hit = 1'b0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (rd_vld[0][w] && rd_tag[0][w] == tag_of(fetch_addr_i)) begin
        tag_hit = 1'b1;
        hit_way = WAY_W'(w);
      end
      if (rd_vld[1][w] && rd_tag[1][w] == tag_of(probe_addr)) probe_hit = 1'b1;
    end
  end

  // ------------------------------------------------------ prefetch + arbiter
  logic  refill_req, refill_gnt, refill_rvalid;
  logic  pf_req, pf_gnt, pf_rvalid, pf_drop;
  addr_t pf_req_addr, pf_addr;
  line_t l15_rdata;
  logic  pf_inflight, pf_buf_vld, pf_wr_req, pf_wr_gnt;
  line_t pf_buf;
  logic  fetch_acc;

  assign fetch_gnt_o = (state_q == S_READY);
  assign fetch_acc   = fetch_req_i && fetch_gnt_o;

  l1_prefetch_ctrl i_pf (
    .clk_i, .rst_ni,
    .pf_en_i,
    .fetch_acc_i      (fetch_acc),
    .fetch_addr_i     (fetch_addr_i),
    .probe_addr_o     (probe_addr),
    .probe_hit_i      (probe_hit),
    .refill_busy_i    (state_q != S_READY),
    .refill_addr_i    (miss_q),
    .req_o            (pf_req),
    .req_addr_o       (pf_req_addr),
    .gnt_i            (pf_gnt),
    .rvalid_i         (pf_rvalid),
    .rdata_i          (l15_rdata),
    .drop_i           (pf_drop),
    .inflight_o       (pf_inflight),
    .pf_addr_o        (pf_addr),
    .buf_vld_o        (pf_buf_vld),
    .buf_data_o       (pf_buf),
    .wr_req_o         (pf_wr_req),
    .wr_gnt_i         (pf_wr_gnt),
    .issued_o         (ev_pf_issue_o),
    .dropped_branch_o (ev_pf_discard_o)
  );

  l1_ooo_arbiter i_arb (
    .refill_req_i    (refill_req),
    .refill_addr_i   (miss_q),
    .refill_gnt_o    (refill_gnt),
    .refill_rvalid_o (refill_rvalid),
    .pf_req_i        (pf_req),
    .pf_addr_i       (pf_req_addr),
    .pf_gnt_o        (pf_gnt),
    .pf_rvalid_o     (pf_rvalid),
    .pf_drop_o       (pf_drop),
    .rdata_o         (l15_rdata),
    .l15_req_o,
    .l15_req_data_o,
    .l15_gnt_i,
    .l15_rvalid_i,
    .l15_rsp_i,
    .l15_drop_i
  );

  // ------------------------------------------------------------ controller
  logic buf_hit_lookup;   // lookup hits the prefetch buffer
  logic pf_match;         // prefetch of the missing line under way
  logic pf_now;           // prefetched copy of the missing line available now
  logic refill_wr;

  assign buf_hit_lookup = pf_buf_vld && pf_addr == line_addr(fetch_addr_i);
  assign pf_match       = pf_inflight && pf_addr == miss_q;
  assign pf_now         = (pf_buf_vld && pf_addr == miss_q) ||
                          (pf_rvalid && pf_addr == miss_q);

  always_comb begin
    state_d        = state_q;
    refill_req     = 1'b0;
    refill_wr      = 1'b0;
    fetch_rvalid_o = rsp_vld_q;
    fetch_rdata_o  = rsp_q;
    ev_wup_o       = 1'b0;
    unique case (state_q)
      S_READY: begin
        if (fetch_acc && !tag_hit && !buf_hit_lookup) state_d = S_MISS;
      end
      S_MISS, S_WUP: begin
        if (pf_now) begin
          fetch_rvalid_o = 1'b1;
          fetch_rdata_o  = pf_buf_vld ? pf_buf : l15_rdata;
          state_d        = S_READY;
        end else if (pf_match) begin
          ev_wup_o = (state_q == S_MISS);
          state_d  = S_WUP;
        end else begin
          refill_req = 1'b1;
          if (refill_gnt) state_d = S_REFILL;
        end
      end
      S_REFILL: begin
        if (refill_rvalid) begin
          fetch_rvalid_o = 1'b1;
          fetch_rdata_o  = l15_rdata;
          refill_wr      = 1'b1;
          state_d        = S_READY;
        end
      end
      default: state_d = S_READY;
    endcase
  end

  // write port: refill first, then prefetch buffer
  assign pf_wr_gnt = pf_wr_req && !refill_wr;
  assign t_we      = refill_wr || pf_wr_gnt;
  assign w_idx     = refill_wr ? idx_of(miss_q) : idx_of(pf_addr);
  assign w_tag     = refill_wr ? tag_of(miss_q) : tag_of(pf_addr);
  assign w_data    = refill_wr ? l15_rdata : pf_buf;
  assign w_way     = lfsr_q[WAY_W-1:0];

  assign ev_hit_o      = fetch_acc && (tag_hit || buf_hit_lookup);
  assign ev_miss_o     = fetch_acc && !tag_hit && !buf_hit_lookup;
  assign ev_pf_hit_o   = fetch_acc && !tag_hit && buf_hit_lookup;
  assign ev_pf_drop_o  = pf_drop;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q   <= S_READY;
      miss_q    <= '0;
      rsp_vld_q <= 1'b0;
      rsp_q     <= '0;
      lfsr_q    <= 8'h5A;
    end else begin
      state_q   <= state_d;
      rsp_vld_q <= fetch_acc && (tag_hit || buf_hit_lookup);
      if (fetch_acc) begin
        rsp_q  <= tag_hit ? arr_rdata : pf_buf;
        miss_q <= line_addr(fetch_addr_i);
      end
      // x^8 + x^6 + x^5 + x^4 + 1
      lfsr_q <= {lfsr_q[6:0], lfsr_q[7] ^ lfsr_q[5] ^ lfsr_q[4] ^ lfsr_q[3]};
    end
  end

  a_req_held: assert property (@(posedge clk_i) disable iff (!rst_ni)
    fetch_req_i && !fetch_gnt_o |=> fetch_req_i);

endmodule
