// Refill bus from the L1.5 banks to the single L2 port.
//
// Each bank offers line refills (b_req_i, line address, b_tag_i = its
// miss-table entry). A round-robin arbiter picks one bank per cycle and
// forwards its request to L2 with the transaction ID {bank, tag}, the role an
// AXI ID plays on the cluster bus. L2 may answer in any order; the bank
// field of the returned ID (l2_rid_i) steers the line back to its bank, and
// that bank's ready (b_rready_i) is passed back as l2_rready_o.
//
// Request and grant are combinational; nothing is buffered here. The
// round-robin refill bus towards L2 follows the design description; the
// valid/ready response handshake and the ID layout are this design's.
module l2_refill_arbiter #(
  parameter int unsigned NB_BANKS = 2,
  parameter int unsigned TAG_W    = 2,
  localparam int unsigned BANK_W = (NB_BANKS > 1) ? $clog2(NB_BANKS) : 1,
  localparam int unsigned ID_W   = BANK_W + TAG_W
) (
  input  logic                                clk_i,
  input  logic                                rst_ni,
  // bank side
  input  logic              [NB_BANKS-1:0]    b_req_i,
  input  icache_pkg::addr_t [NB_BANKS-1:0]    b_addr_i,
  input  logic [NB_BANKS-1:0][TAG_W-1:0]      b_tag_i,
  output logic              [NB_BANKS-1:0]    b_gnt_o,
  output logic              [NB_BANKS-1:0]    b_rvalid_o,
  output icache_pkg::line_t                   b_rdata_o,
  output logic [TAG_W-1:0]                    b_rtag_o,
  input  logic              [NB_BANKS-1:0]    b_rready_i,
  // L2 side
  output logic                                l2_req_o,
  output icache_pkg::addr_t                   l2_addr_o,
  output logic [ID_W-1:0]                     l2_id_o,
  input  logic                                l2_gnt_i,
  input  logic                                l2_rvalid_i,
  input  icache_pkg::line_t                   l2_rdata_i,
  input  logic [ID_W-1:0]                     l2_rid_i,
  output logic                                l2_rready_o
);
  logic [NB_BANKS-1:0] gnt;
  logic [BANK_W-1:0]   sel;

  rr_arbiter #(.N(NB_BANKS)) i_arb (
    .clk_i, .rst_ni,
    .req_i (b_req_i),
    .ack_i (l2_gnt_i),
    .gnt_o (gnt),
    .idx_o (sel)
  );

  assign l2_req_o  = |b_req_i;
  assign l2_addr_o = b_addr_i[sel];
  assign l2_id_o   = {sel, b_tag_i[sel]};
  assign b_gnt_o   = l2_gnt_i ? gnt : '0;

  logic [BANK_W-1:0] rbank;
  assign rbank     = l2_rid_i[ID_W-1 -: BANK_W];
  assign b_rdata_o = l2_rdata_i;
  assign b_rtag_o  = l2_rid_i[TAG_W-1:0];

  always_comb begin
    b_rvalid_o        = '0;
    b_rvalid_o[rbank] = l2_rvalid_i;
  end
  assign l2_rready_o = b_rready_i[rbank];

endmodule
