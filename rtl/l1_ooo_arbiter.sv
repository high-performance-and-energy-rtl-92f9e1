// Shares the single request port from a private L1 to the L1.5 between the
// demand refill path and the prefetcher, and sorts the responses.
//
// Each transfer carries a one-bit ID as the most significant bit of the
// request (icache_pkg::l15_req_t): 0 for a refill, 1 for a prefetch. Both
// kinds may be outstanding at once and their responses may come back in
// either order; the ID returned with each response (l15_rsp_t) steers it to
// the refill path or to the prefetcher. The refill wins when both request in
// the same cycle. A prefetch response that the interconnect had to discard
// because it met a refill response in the same cycle is reported to the
// prefetcher on pf_drop_o.
//
// Purely combinational: request, grant and response pass through in the same
// cycle. The one-bit ID in the address MSB, the shared port and refill
// priority follow the design description.
module l1_ooo_arbiter (
  input  logic                  refill_req_i,
  input  icache_pkg::addr_t     refill_addr_i,
  output logic                  refill_gnt_o,
  output logic                  refill_rvalid_o,
  input  logic                  pf_req_i,
  input  icache_pkg::addr_t     pf_addr_i,
  output logic                  pf_gnt_o,
  output logic                  pf_rvalid_o,
  output logic                  pf_drop_o,
  output icache_pkg::line_t     rdata_o,
  // port towards the interconnect
  output logic                  l15_req_o,
  output icache_pkg::l15_req_t  l15_req_data_o,
  input  logic                  l15_gnt_i,
  input  logic                  l15_rvalid_i,
  input  icache_pkg::l15_rsp_t  l15_rsp_i,
  input  logic                  l15_drop_i
);
  import icache_pkg::*;

  assign l15_req_o           = refill_req_i || pf_req_i;
  assign l15_req_data_o.id   = refill_req_i ? ID_REFILL : ID_PREFETCH;
  assign l15_req_data_o.addr = refill_req_i ? refill_addr_i : pf_addr_i;
  assign refill_gnt_o        = refill_req_i && l15_gnt_i;
  assign pf_gnt_o            = !refill_req_i && pf_req_i && l15_gnt_i;

  assign refill_rvalid_o = l15_rvalid_i && l15_rsp_i.id == ID_REFILL;
  assign pf_rvalid_o     = l15_rvalid_i && l15_rsp_i.id == ID_PREFETCH;
  assign pf_drop_o       = l15_drop_i;
  assign rdata_o         = l15_rsp_i.data;
endmodule
