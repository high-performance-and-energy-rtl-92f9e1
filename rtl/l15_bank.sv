// One bank of the shared L1.5 instruction cache.
//
// SIZE_B bytes (2 KiB by default), WAYS-way set-associative, 128-bit lines,
// single-ported: at most one request is accepted per cycle. Lines are
// interleaved over NB_BANKS banks, so the set index is taken from the
// address bits above the bank-select bits.
//
// Request side: req_i/req_data_i/src_i (source master) with gnt_o. A hit
// is answered in the next cycle on rvalid_o/rsp_o/rsrc_o; the response keeps
// the request's transfer ID. On a miss the bank does not block: the miss is
// entered in a table of N_MSHR pending refills keyed by line address. A
// further miss to a line already in the table is merged into that entry
// (only its requester is recorded, one bit per master and transfer ID), so
// each line is fetched from L2 once however many cores ask for it. A miss
// is refused (gnt_o low) only when the table is full. Entries not yet sent
// are offered to L2 in index order on l2_req_o/l2_addr_o/l2_tag_o (the tag
// is the entry index).
//
// When L2 returns a line (l2_rvalid_i with l2_rtag_i, accepted when
// l2_rready_o), it is written into a pseudo-randomly chosen way, the first
// recorded requester is answered in the next cycle straight from the L2
// data, and any further requesters follow one per cycle from a copy of the
// line. The bank takes no new request in the cycle a line arrives nor while
// it answers the further requesters.
//
// Timing: hit response one cycle after the grant; with the interconnect's
// response buffer the L1 sees it two cycles after its request. A miss is
// answered one cycle after the L2 line arrives.
//
// Size, associativity, single port, non-blocking misses with merging of
// refills to the same line and pseudo-random replacement follow the design
// description; the table size, the one-response-per-cycle drain and the
// L2 port handshake are this design's choices.
module l15_bank #(
  parameter int unsigned SIZE_B   = 2048,
  parameter int unsigned WAYS     = 4,
  parameter int unsigned NB_MST   = 8,
  parameter int unsigned NB_BANKS = 2,
  parameter int unsigned N_MSHR   = 4,
  localparam int unsigned MST_W  = (NB_MST > 1) ? $clog2(NB_MST) : 1,
  localparam int unsigned MSHR_W = (N_MSHR > 1) ? $clog2(N_MSHR) : 1
) (
  input  logic                  clk_i,
  input  logic                  rst_ni,
  // from the interconnect
  input  logic                  req_i,
  input  icache_pkg::l15_req_t  req_data_i,
  input  logic [MST_W-1:0]      src_i,
  output logic                  gnt_o,
  output logic                  rvalid_o,
  output icache_pkg::l15_rsp_t  rsp_o,
  output logic [MST_W-1:0]      rsrc_o,
  // towards L2
  output logic                  l2_req_o,
  output icache_pkg::addr_t     l2_addr_o,
  output logic [MSHR_W-1:0]     l2_tag_o,
  input  logic                  l2_gnt_i,
  input  logic                  l2_rvalid_i,
  input  icache_pkg::line_t     l2_rdata_i,
  input  logic [MSHR_W-1:0]     l2_rtag_i,
  output logic                  l2_rready_o,
  // event strobes
  output logic                  ev_hit_o,
  output logic                  ev_miss_o,
  output logic                  ev_merge_o
);
  import icache_pkg::*;

  localparam int unsigned SETS   = SIZE_B / LINE_B / WAYS;
  localparam int unsigned IDX_W  = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned BANK_W = (NB_BANKS > 1) ? $clog2(NB_BANKS) : 0;
  localparam int unsigned TAG_W  = ADDR_W - OFFS_W - BANK_W - IDX_W;
  localparam int unsigned NW     = 2 * NB_MST;   // requester bits per entry

  function automatic logic [IDX_W-1:0] idx_of(addr_t a);
    return a[OFFS_W + BANK_W +: IDX_W];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(addr_t a);
    return a[ADDR_W-1 -: TAG_W];
  endfunction

  // ----------------------------------------------------------- miss table (declared first: the tag write uses it)
  logic  [N_MSHR-1:0]         mshr_vld_q, mshr_sent_q;
  addr_t                      mshr_addr_q [N_MSHR];
  logic  [N_MSHR-1:0][NW-1:0] mshr_wait_q;

  // --------------------------------------------------------------- arrays
  logic [0:0][IDX_W-1:0]           rd_idx;
  logic [0:0][WAYS-1:0][TAG_W-1:0] rd_tag;
  logic [0:0][WAYS-1:0]            rd_vld;
  logic                            we;
  logic [IDX_W-1:0]                w_idx;
  logic [WAY_W-1:0]                w_way;
  logic [WAY_W-1:0]                hit_way;
  line_t                           arr_rdata;
  logic [7:0]                      lfsr_q;

  addr_t req_addr;
  assign req_addr  = line_addr(req_data_i.addr);
  assign rd_idx[0] = idx_of(req_addr);

  scm_tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W), .NRD(1)) i_tag (
    .clk_i, .rst_ni,
    .rd_idx_i (rd_idx),
    .rd_tag_o (rd_tag),
    .rd_vld_o (rd_vld),
    .we_i     (we),
    .w_idx_i  (w_idx),
    .w_way_i  (w_way),
    .w_tag_i  (tag_of(mshr_addr_q[l2_rtag_i]))
  );

  scm_data_array #(.SETS(SETS), .WAYS(WAYS), .WIDTH(LINE_W)) i_data (
    .clk_i,
    .rd_idx_i  (rd_idx[0]),
    .rd_way_i  (hit_way),
    .rd_data_o (arr_rdata),
    .we_i      (we),
    .w_idx_i   (w_idx),
    .w_way_i   (w_way),
    .w_data_i  (l2_rdata_i)
  );


  logic              drain_q;
  logic [MSHR_W-1:0] drain_idx_q;
  line_t             drain_line_q;

  logic              hit, match, free_avail;
  logic [MSHR_W-1:0] match_idx, free_idx, send_idx;
  logic              send_avail;

  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (rd_vld[0][w] && rd_tag[0][w] == tag_of(req_addr)) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
    end
    match      = 1'b0;
    match_idx  = '0;
    free_avail = 1'b0;
    free_idx   = '0;
    send_avail = 1'b0;
    send_idx   = '0;
    for (int i = N_MSHR - 1; i >= 0; i--) begin
      if (mshr_vld_q[i] && mshr_addr_q[i] == req_addr) begin
        match     = 1'b1;
        match_idx = MSHR_W'(i);
      end
      if (!mshr_vld_q[i]) begin
        free_avail = 1'b1;
        free_idx   = MSHR_W'(i);
      end
      if (mshr_vld_q[i] && !mshr_sent_q[i]) begin
        send_avail = 1'b1;
        send_idx   = MSHR_W'(i);
      end
    end
  end

  logic acc;
  assign gnt_o = req_i && !drain_q && !l2_rvalid_i && (hit || match || free_avail);
  assign acc   = gnt_o;

  assign ev_hit_o   = acc && hit;
  assign ev_miss_o  = acc && !hit;
  assign ev_merge_o = acc && !hit && match;

  assign l2_req_o    = send_avail;
  assign l2_addr_o   = mshr_addr_q[send_idx];
  assign l2_tag_o    = send_idx;
  assign l2_rready_o = !drain_q;

  assign we    = l2_rvalid_i && l2_rready_o;
  assign w_idx = idx_of(mshr_addr_q[l2_rtag_i]);
  assign w_way = lfsr_q[WAY_W-1:0];

  // requester bit {src, id}
  logic [$clog2(NW)-1:0] req_bit;
  assign req_bit = {src_i, req_data_i.id};

  // next requester to answer: of the arriving line, or of the line being
  // drained (the two never coincide, a line is only taken when not draining)
  logic [MSHR_W-1:0]     ans_idx;
  logic [$clog2(NW)-1:0] drain_bit;
  logic [NW-1:0]         drain_left;
  always_comb begin
    ans_idx   = drain_q ? drain_idx_q : l2_rtag_i;
    drain_bit = '0;
    for (int k = NW - 1; k >= 0; k--)
      if (mshr_wait_q[ans_idx][k]) drain_bit = ($clog2(NW))'(k);
    drain_left = mshr_wait_q[ans_idx];
    drain_left[drain_bit] = 1'b0;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      mshr_vld_q   <= '0;
      mshr_sent_q  <= '0;
      mshr_wait_q  <= '0;
      for (int i = 0; i < N_MSHR; i++) mshr_addr_q[i] <= '0;
      drain_q      <= 1'b0;
      drain_idx_q  <= '0;
      drain_line_q <= '0;
      rvalid_o     <= 1'b0;
      rsp_o        <= '0;
      rsrc_o       <= '0;
      lfsr_q       <= 8'hA7;
    end else begin
      lfsr_q   <= {lfsr_q[6:0], lfsr_q[7] ^ lfsr_q[5] ^ lfsr_q[4] ^ lfsr_q[3]};
      rvalid_o <= 1'b0;
      // accept a request
      if (acc) begin
        if (hit) begin
          rvalid_o   <= 1'b1;
          rsp_o.id   <= req_data_i.id;
          rsp_o.data <= arr_rdata;
          rsrc_o     <= src_i;
        end else if (match) begin
          mshr_wait_q[match_idx][req_bit] <= 1'b1;
        end else begin
          mshr_vld_q[free_idx]       <= 1'b1;
          mshr_sent_q[free_idx]      <= 1'b0;
          mshr_addr_q[free_idx]      <= req_addr;
          mshr_wait_q[free_idx]      <= '0;
          mshr_wait_q[free_idx][req_bit] <= 1'b1;
        end
      end
      // send a refill to L2
      if (l2_req_o && l2_gnt_i) mshr_sent_q[send_idx] <= 1'b1;
      // line back from L2: answer the first requester at once
      if (we) begin
        rvalid_o     <= 1'b1;
        rsp_o.id     <= xfer_id_e'(drain_bit[0]);
        rsp_o.data   <= l2_rdata_i;
        rsrc_o       <= MST_W'(drain_bit >> 1);
        mshr_wait_q[l2_rtag_i] <= drain_left;
        drain_idx_q  <= l2_rtag_i;
        drain_line_q <= l2_rdata_i;
        if (drain_left == '0) mshr_vld_q[l2_rtag_i] <= 1'b0;
        else                  drain_q <= 1'b1;
      end
      // answer the further requesters one per cycle
      if (drain_q) begin
        rvalid_o    <= 1'b1;
        rsp_o.id    <= xfer_id_e'(drain_bit[0]);
        rsp_o.data  <= drain_line_q;
        rsrc_o      <= MST_W'(drain_bit >> 1);
        mshr_wait_q[drain_idx_q] <= drain_left;
        if (drain_left == '0) begin
          drain_q                 <= 1'b0;
          mshr_vld_q[drain_idx_q] <= 1'b0;
        end
      end
    end
  end

  a_l2_rsp_for_pending: assert property (@(posedge clk_i) disable iff (!rst_ni)
    l2_rvalid_i |-> mshr_vld_q[l2_rtag_i] && mshr_sent_q[l2_rtag_i]);

endmodule
