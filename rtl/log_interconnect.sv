// Read-only logarithmic interconnect between NB_MST private L1 caches and
// NB_BANKS shared L1.5 banks.
//
// Requests are routed to the bank selected by the line-address bits just
// above the byte offset (consecutive lines alternate between banks). Each
// bank has a round-robin arbiter over the masters addressing it; a master is
// granted when its arbiter picks it and the bank accepts (bank_gnt_i). The
// bank is told the source master (bank_src_o) and sends it back with its
// response (bank_rsrc_i), which routes the response to that master.
//
// Out-of-order support: a master may have a refill (ID 0) and a prefetch
// (ID 1) outstanding in different banks, so two banks can answer the same
// master in one cycle. The refill response is then delivered and the
// prefetch response discarded; mst_drop_o tells the master.
//
// Optional pipeline buffers, chosen by parameter: REQ_BUF adds a one-entry
// register slice per master on the request path (grant means "taken into the
// slice"), RSP_BUF registers every master's response for one cycle. With the
// defaults (REQ_BUF = 0, RSP_BUF = 1) request and grant are combinational and
// a response reaches the master one cycle after the bank produced it.
//
// Round-robin per bank, the request and response buffers selectable by
// parameter with only the response buffer enabled, and dropping the
// prefetch response on a collision follow the design description. The
// line-interleaved bank mapping is this design's choice.
module log_interconnect #(
  parameter int unsigned NB_MST   = 8,
  parameter int unsigned NB_BANKS = 2,
  parameter bit          REQ_BUF  = 1'b0,
  parameter bit          RSP_BUF  = 1'b1,
  localparam int unsigned MST_W  = (NB_MST > 1) ? $clog2(NB_MST) : 1,
  localparam int unsigned BANK_W = (NB_BANKS > 1) ? $clog2(NB_BANKS) : 1
) (
  input  logic                                clk_i,
  input  logic                                rst_ni,
  // masters (private L1 caches)
  input  logic                 [NB_MST-1:0]   mst_req_i,
  input  icache_pkg::l15_req_t [NB_MST-1:0]   mst_req_data_i,
  output logic                 [NB_MST-1:0]   mst_gnt_o,
  output logic                 [NB_MST-1:0]   mst_rvalid_o,
  output icache_pkg::l15_rsp_t [NB_MST-1:0]   mst_rsp_o,
  output logic                 [NB_MST-1:0]   mst_drop_o,
  // banks (shared L1.5)
  output logic                 [NB_BANKS-1:0] bank_req_o,
  output icache_pkg::l15_req_t [NB_BANKS-1:0] bank_req_data_o,
  output logic [NB_BANKS-1:0][MST_W-1:0]      bank_src_o,
  input  logic                 [NB_BANKS-1:0] bank_gnt_i,
  input  logic                 [NB_BANKS-1:0] bank_rvalid_i,
  input  icache_pkg::l15_rsp_t [NB_BANKS-1:0] bank_rsp_i,
  input  logic [NB_BANKS-1:0][MST_W-1:0]      bank_rsrc_i
);
  import icache_pkg::*;

  // ------------------------------------------------ optional request slice
  logic     [NB_MST-1:0] a_req;      // request seen by the arbiters
  l15_req_t [NB_MST-1:0] a_data;
  logic     [NB_MST-1:0] a_gnt;      // granted by a bank

  if (REQ_BUF) begin : g_req_buf
    logic     [NB_MST-1:0] vld_q;
    l15_req_t [NB_MST-1:0] data_q;
    for (genvar m = 0; m < NB_MST; m++) begin : g_m
      assign a_req[m]     = vld_q[m];
      assign a_data[m]    = data_q[m];
      assign mst_gnt_o[m] = !vld_q[m] || a_gnt[m];
      always_ff @(posedge clk_i or negedge rst_ni) begin
        if (!rst_ni) begin
          vld_q[m]  <= 1'b0;
          data_q[m] <= '0;
        end else if (mst_gnt_o[m]) begin
          vld_q[m]  <= mst_req_i[m];
          data_q[m] <= mst_req_data_i[m];
        end
      end
    end
  end else begin : g_no_req_buf
    assign a_req     = mst_req_i;
    assign a_data    = mst_req_data_i;
    assign mst_gnt_o = a_gnt;
  end

  // ------------------------------------------------------ per-bank arbiters
  logic [NB_BANKS-1:0][NB_MST-1:0] bank_gnt_vec;

  for (genvar b = 0; b < NB_BANKS; b++) begin : g_bank
    logic [NB_MST-1:0] sel;
    logic [MST_W-1:0]  idx;
    for (genvar m = 0; m < NB_MST; m++) begin : g_sel
      if (NB_BANKS > 1) begin : g_multi
        assign sel[m] = a_req[m] && (a_data[m].addr[OFFS_W +: BANK_W] == BANK_W'(b));
      end else begin : g_single
        assign sel[m] = a_req[m];
      end
    end
    rr_arbiter #(.N(NB_MST)) i_arb (
      .clk_i, .rst_ni,
      .req_i (sel),
      .ack_i (bank_gnt_i[b]),
      .gnt_o (bank_gnt_vec[b]),
      .idx_o (idx)
    );
    assign bank_req_o[b]      = |sel;
    assign bank_req_data_o[b] = a_data[idx];
    assign bank_src_o[b]      = idx;
  end

  always_comb begin
    a_gnt = '0;
    for (int unsigned b = 0; b < NB_BANKS; b++)
      if (bank_gnt_i[b]) a_gnt |= bank_gnt_vec[b];
  end

  // ------------------------------------------------------- response routing
  logic     [NB_MST-1:0] r_vld, r_drop;
  l15_rsp_t [NB_MST-1:0] r_rsp;

  always_comb begin
    r_vld  = '0;
    r_drop = '0;
    r_rsp  = '0;
    for (int unsigned m = 0; m < NB_MST; m++) begin
      for (int unsigned b = 0; b < NB_BANKS; b++) begin
        if (bank_rvalid_i[b] && bank_rsrc_i[b] == MST_W'(m)) begin
          if (!r_vld[m]) begin
            r_vld[m] = 1'b1;
            r_rsp[m] = bank_rsp_i[b];
          end else begin
            // collision: keep the refill, drop the prefetch
            r_drop[m] = 1'b1;
            if (bank_rsp_i[b].id == ID_REFILL) r_rsp[m] = bank_rsp_i[b];
          end
        end
      end
    end
  end

  if (RSP_BUF) begin : g_rsp_buf
    always_ff @(posedge clk_i or negedge rst_ni) begin
      if (!rst_ni) begin
        mst_rvalid_o <= '0;
        mst_rsp_o    <= '0;
        mst_drop_o   <= '0;
      end else begin
        mst_rvalid_o <= r_vld;
        mst_rsp_o    <= r_rsp;
        mst_drop_o   <= r_drop;
      end
    end
  end else begin : g_no_rsp_buf
    assign mst_rvalid_o = r_vld;
    assign mst_rsp_o    = r_rsp;
    assign mst_drop_o   = r_drop;
  end

endmodule
