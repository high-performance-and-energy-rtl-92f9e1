// Two-level instruction cache subsystem of an NB_CORES-core cluster, with
// next-line prefetch in the private level and a timing-optimised fetch stage
// in front of it.
//
// Per core: if_fetch_unit (L0 line buffer + 4 x 32-bit ring FIFO, delayed
// conditional branch) -> l1_icache (512 B, 4-way, 1-cycle hit, prefetcher,
// one L1.5 port shared by refill and prefetch through l1_ooo_arbiter).
// Shared: log_interconnect (round-robin per bank, response buffer) ->
// NB_BANKS x l15_bank (2 KiB, 4-way, single port, merged non-blocking
// misses) -> l2_refill_arbiter -> one L2 port.
//
// Latencies seen by a core fetch: L1 hit 1 cycle; L1 miss that hits in the
// L1.5 3 cycles (one to send the refill, one in the bank, one in the
// response buffer); a fetch that misses in both levels takes the L2 round
// trip plus 4 cycles (19 with a 15-cycle L2). Interleaving of
// lines over the banks uses the line-address bits just above the offset.
//
// Interface: per core a redirect port (jump_i in decode, branch_i in
// execute, both with target addresses) and an instruction port
// (instr_valid_o/instr_addr_o/instr_rdata_o/instr_ready_i); a cluster-wide
// fetch_en_i and boot_addr_i; a register port (reg_*, see
// icache_ctrl_regs) for the per-core software prefetch enable and the
// event counters; one L2 refill port with transaction IDs and a valid/ready
// response. The ev_* outputs pulse once per event, as the counters see them.
//
// The organisation (private L1 + shared single-port L1.5 over a
// logarithmic interconnect, sizes, prefetch with software enable, ring
// FIFO, hardware counters) follows the design description in its main
// configuration; ports, register map, event strobes and the L2 handshake
// are this design's.
module hier_icache #(
  parameter int unsigned NB_CORES   = 8,
  parameter int unsigned L1_SIZE_B  = 512,
  parameter int unsigned L1_WAYS    = 4,
  parameter int unsigned NB_BANKS   = 2,
  parameter int unsigned L15_SIZE_B = 2048,
  parameter int unsigned L15_WAYS   = 4,
  parameter int unsigned N_MSHR     = 4,
  parameter bit          REQ_BUF    = 1'b0,
  parameter bit          RSP_BUF    = 1'b1,
  parameter int unsigned FIFO_DEPTH = 4,
  localparam int unsigned MSHR_W = (N_MSHR > 1) ? $clog2(N_MSHR) : 1,
  localparam int unsigned BANK_W = (NB_BANKS > 1) ? $clog2(NB_BANKS) : 1,
  localparam int unsigned L2ID_W = BANK_W + MSHR_W
) (
  input  logic                                clk_i,
  input  logic                                rst_ni,
  input  logic                                fetch_en_i,
  input  icache_pkg::addr_t                   boot_addr_i,
  // control and counter registers
  input  logic                                reg_req_i,
  input  logic                                reg_we_i,
  input  logic [3:0]                          reg_addr_i,
  input  logic [31:0]                         reg_wdata_i,
  output logic                                reg_rvalid_o,
  output logic [31:0]                         reg_rdata_o,
  // per-core redirect and instruction ports
  input  logic              [NB_CORES-1:0]    jump_i,
  input  icache_pkg::addr_t [NB_CORES-1:0]    jump_addr_i,
  input  logic              [NB_CORES-1:0]    branch_i,
  input  icache_pkg::addr_t [NB_CORES-1:0]    branch_addr_i,
  output logic              [NB_CORES-1:0]    instr_valid_o,
  output icache_pkg::addr_t [NB_CORES-1:0]    instr_addr_o,
  output icache_pkg::word_t [NB_CORES-1:0]    instr_rdata_o,
  input  logic              [NB_CORES-1:0]    instr_ready_i,
  // L2 refill port
  output logic                                l2_req_o,
  output icache_pkg::addr_t                   l2_addr_o,
  output logic [L2ID_W-1:0]                   l2_id_o,
  input  logic                                l2_gnt_i,
  input  logic                                l2_rvalid_i,
  input  icache_pkg::line_t                   l2_rdata_i,
  input  logic [L2ID_W-1:0]                   l2_rid_i,
  output logic                                l2_rready_o,
  // event strobes
  output logic              [NB_CORES-1:0]    ev_l1_hit_o,
  output logic              [NB_CORES-1:0]    ev_l1_miss_o,
  output logic              [NB_CORES-1:0]    ev_pf_issue_o,
  output logic              [NB_CORES-1:0]    ev_pf_hit_o,
  output logic              [NB_CORES-1:0]    ev_wup_o,
  output logic              [NB_CORES-1:0]    ev_pf_drop_o,
  output logic              [NB_CORES-1:0]    ev_pf_discard_o,
  output logic              [NB_BANKS-1:0]    ev_l15_hit_o,
  output logic              [NB_BANKS-1:0]    ev_l15_miss_o,
  output logic              [NB_BANKS-1:0]    ev_l15_merge_o
);
  import icache_pkg::*;

  // software prefetch enable and performance counters
  logic [NB_CORES-1:0] pf_en;

  icache_ctrl_regs #(.NB_CORES(NB_CORES), .NB_BANKS(NB_BANKS)) i_regs (
    .clk_i, .rst_ni,
    .reg_req_i, .reg_we_i, .reg_addr_i, .reg_wdata_i, .reg_rvalid_o, .reg_rdata_o,
    .pf_en_o        (pf_en),
    .ev_l1_hit_i    (ev_l1_hit_o),
    .ev_l1_miss_i   (ev_l1_miss_o),
    .ev_pf_issue_i  (ev_pf_issue_o),
    .ev_pf_hit_i    (ev_pf_hit_o),
    .ev_wup_i       (ev_wup_o),
    .ev_pf_drop_i   (ev_pf_drop_o),
    .ev_pf_discard_i(ev_pf_discard_o),
    .ev_l15_hit_i   (ev_l15_hit_o),
    .ev_l15_miss_i  (ev_l15_miss_o),
    .ev_l15_merge_i (ev_l15_merge_o)
  );

  localparam int unsigned MST_W = (NB_CORES > 1) ? $clog2(NB_CORES) : 1;

  // core <-> L1
  logic  [NB_CORES-1:0] f_req, f_gnt, f_rvalid;
  addr_t [NB_CORES-1:0] f_addr;
  line_t [NB_CORES-1:0] f_rdata;
  // L1 <-> interconnect
  logic     [NB_CORES-1:0] m_req, m_gnt, m_rvalid, m_drop;
  l15_req_t [NB_CORES-1:0] m_req_data;
  l15_rsp_t [NB_CORES-1:0] m_rsp;
  // interconnect <-> banks
  logic     [NB_BANKS-1:0]            b_req, b_gnt, b_rvalid;
  l15_req_t [NB_BANKS-1:0]            b_req_data;
  l15_rsp_t [NB_BANKS-1:0]            b_rsp;
  logic     [NB_BANKS-1:0][MST_W-1:0] b_src, b_rsrc;
  // banks <-> L2 bus
  logic  [NB_BANKS-1:0]             r_req, r_gnt, r_rvalid, r_rready;
  addr_t [NB_BANKS-1:0]             r_addr;
  logic  [NB_BANKS-1:0][MSHR_W-1:0] r_tag;
  line_t                            r_rdata;
  logic  [MSHR_W-1:0]               r_rtag;

  for (genvar c = 0; c < NB_CORES; c++) begin : g_core
    if_fetch_unit #(.FIFO_DEPTH(FIFO_DEPTH)) i_if (
      .clk_i, .rst_ni,
      .fetch_en_i,
      .boot_addr_i,
      .jump_i         (jump_i[c]),
      .jump_addr_i    (jump_addr_i[c]),
      .branch_i       (branch_i[c]),
      .branch_addr_i  (branch_addr_i[c]),
      .instr_valid_o  (instr_valid_o[c]),
      .instr_addr_o   (instr_addr_o[c]),
      .instr_rdata_o  (instr_rdata_o[c]),
      .instr_ready_i  (instr_ready_i[c]),
      .fetch_req_o    (f_req[c]),
      .fetch_addr_o   (f_addr[c]),
      .fetch_gnt_i    (f_gnt[c]),
      .fetch_rvalid_i (f_rvalid[c]),
      .fetch_rdata_i  (f_rdata[c])
    );

    l1_icache #(.SIZE_B(L1_SIZE_B), .WAYS(L1_WAYS)) i_l1 (
      .clk_i, .rst_ni,
      .pf_en_i        (pf_en[c]),
      .fetch_req_i    (f_req[c]),
      .fetch_addr_i   (f_addr[c]),
      .fetch_gnt_o    (f_gnt[c]),
      .fetch_rvalid_o (f_rvalid[c]),
      .fetch_rdata_o  (f_rdata[c]),
      .l15_req_o      (m_req[c]),
      .l15_req_data_o (m_req_data[c]),
      .l15_gnt_i      (m_gnt[c]),
      .l15_rvalid_i   (m_rvalid[c]),
      .l15_rsp_i      (m_rsp[c]),
      .l15_drop_i     (m_drop[c]),
      .ev_hit_o       (ev_l1_hit_o[c]),
      .ev_miss_o      (ev_l1_miss_o[c]),
      .ev_pf_issue_o  (ev_pf_issue_o[c]),
      .ev_pf_hit_o    (ev_pf_hit_o[c]),
      .ev_wup_o       (ev_wup_o[c]),
      .ev_pf_drop_o   (ev_pf_drop_o[c]),
      .ev_pf_discard_o(ev_pf_discard_o[c])
    );
  end

  log_interconnect #(
    .NB_MST(NB_CORES), .NB_BANKS(NB_BANKS), .REQ_BUF(REQ_BUF), .RSP_BUF(RSP_BUF)
  ) i_xbar (
    .clk_i, .rst_ni,
    .mst_req_i       (m_req),
    .mst_req_data_i  (m_req_data),
    .mst_gnt_o       (m_gnt),
    .mst_rvalid_o    (m_rvalid),
    .mst_rsp_o       (m_rsp),
    .mst_drop_o      (m_drop),
    .bank_req_o      (b_req),
    .bank_req_data_o (b_req_data),
    .bank_src_o      (b_src),
    .bank_gnt_i      (b_gnt),
    .bank_rvalid_i   (b_rvalid),
    .bank_rsp_i      (b_rsp),
    .bank_rsrc_i     (b_rsrc)
  );

  for (genvar b = 0; b < NB_BANKS; b++) begin : g_bank
    l15_bank #(
      .SIZE_B(L15_SIZE_B), .WAYS(L15_WAYS), .NB_MST(NB_CORES),
      .NB_BANKS(NB_BANKS), .N_MSHR(N_MSHR)
    ) i_bank (
      .clk_i, .rst_ni,
      .req_i       (b_req[b]),
      .req_data_i  (b_req_data[b]),
      .src_i       (b_src[b]),
      .gnt_o       (b_gnt[b]),
      .rvalid_o    (b_rvalid[b]),
      .rsp_o       (b_rsp[b]),
      .rsrc_o      (b_rsrc[b]),
      .l2_req_o    (r_req[b]),
      .l2_addr_o   (r_addr[b]),
      .l2_tag_o    (r_tag[b]),
      .l2_gnt_i    (r_gnt[b]),
      .l2_rvalid_i (r_rvalid[b]),
      .l2_rdata_i  (r_rdata),
      .l2_rtag_i   (r_rtag),
      .l2_rready_o (r_rready[b]),
      .ev_hit_o    (ev_l15_hit_o[b]),
      .ev_miss_o   (ev_l15_miss_o[b]),
      .ev_merge_o  (ev_l15_merge_o[b])
    );
  end

  l2_refill_arbiter #(.NB_BANKS(NB_BANKS), .TAG_W(MSHR_W)) i_l2bus (
    .clk_i, .rst_ni,
    .b_req_i     (r_req),
    .b_addr_i    (r_addr),
    .b_tag_i     (r_tag),
    .b_gnt_o     (r_gnt),
    .b_rvalid_o  (r_rvalid),
    .b_rdata_o   (r_rdata),
    .b_rtag_o    (r_rtag),
    .b_rready_i  (r_rready),
    .l2_req_o,
    .l2_addr_o,
    .l2_id_o,
    .l2_gnt_i,
    .l2_rvalid_i,
    .l2_rdata_i,
    .l2_rid_i,
    .l2_rready_o
  );

endmodule
