// Timing-optimised instruction fetch stage of one core.
//
// The stage keeps the last 128-bit line returned by the L1 cache in an L0
// buffer and hands it on word by word through a 4 x 32-bit ring FIFO
// (fetch_ring_fifo) to the decoder. The point of the structure is timing:
// fetch_req_o and fetch_addr_o are functions of registers only (the fetch
// pointer, the L0 tag and the outstanding-request flag), never of
// fetch_rvalid_i, fetch_rdata_i or the redirect inputs, so no combinational
// path runs from the cache response or from the execute stage back into the
// cache's tag lookup.
//
// Redirects: jump_i (unconditional jump resolved in decode) acts in the same
// cycle; branch_i (conditional branch resolved in execute) is registered
// first and acts one cycle later, which removes the execute-to-fetch path at
// the price of one cycle per taken branch. The delayed branch wins over a
// jump in the same cycle because it is the older instruction. A redirect that
// hits a word still held in the ring only moves the ring's read pointer;
// otherwise the ring is cleared and fetching restarts at the target word.
//
// Cache side: request/grant handshake (fetch_req_o held until fetch_gnt_i),
// one line request outstanding, response on fetch_rvalid_i/fetch_rdata_i any
// later cycle. A line that arrives is written into L0 and, if it holds the
// word the fetch pointer needs, that word is pushed into the ring in the same
// cycle. A response to a line no longer needed after a redirect is still
// waited for (it only refills L0).
//
// Decoder side: instr_valid_o/instr_addr_o/instr_rdata_o with instr_ready_i.
// Words are 32-bit and word-aligned; re-assembling compressed and misaligned
// instructions is left to the core's decoder.
//
// The ring FIFO, the L0 buffer, the request issued without dependence on
// other signals and the one-cycle conditional branch delay come from the
// design description; the boot handshake, the single outstanding request and
// the redirect priorities are this design's choices.
module if_fetch_unit #(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  input  logic                fetch_en_i,
  input  icache_pkg::addr_t   boot_addr_i,
  // redirects from the core
  input  logic                jump_i,
  input  icache_pkg::addr_t   jump_addr_i,
  input  logic                branch_i,
  input  icache_pkg::addr_t   branch_addr_i,
  // decoder side
  output logic                instr_valid_o,
  output icache_pkg::addr_t   instr_addr_o,
  output icache_pkg::word_t   instr_rdata_o,
  input  logic                instr_ready_i,
  // L1 cache side
  output logic                fetch_req_o,
  output icache_pkg::addr_t   fetch_addr_o,
  input  logic                fetch_gnt_i,
  input  logic                fetch_rvalid_i,
  input  icache_pkg::line_t   fetch_rdata_i
);
  import icache_pkg::*;

  logic   started_q;
  addr_t  ptr_q;            // word address of the next word to push
  line_t  l0_line_q;
  addr_t  l0_addr_q;
  logic   l0_vld_q;
  logic   pend_q;
  addr_t  pend_addr_q;
  logic   br_q;
  addr_t  br_addr_q;

  // redirect of this cycle
  logic   redir;
  addr_t  redir_addr;
  assign redir      = started_q && (br_q || jump_i);
  assign redir_addr = br_q ? br_addr_q : jump_addr_i;

  // request: registered state only
  logic l0_cover;
  assign l0_cover     = l0_vld_q && (l0_addr_q == line_addr(ptr_q));
  assign fetch_req_o  = started_q && !pend_q && !l0_cover;
  assign fetch_addr_o = line_addr(ptr_q);

  // word source for the ring
  logic  rsp_cover;
  line_t src_line;
  logic  src_ok;
  assign rsp_cover = fetch_rvalid_i && pend_q && (pend_addr_q == line_addr(ptr_q));
  assign src_line  = rsp_cover ? fetch_rdata_i : l0_line_q;
  assign src_ok    = rsp_cover || l0_cover;

  logic  fifo_full, fifo_hit, push;
  assign push = started_q && src_ok && !fifo_full && !redir;

  fetch_ring_fifo #(.DEPTH(FIFO_DEPTH)) i_ring (
    .clk_i,
    .rst_ni,
    .push_i          (push),
    .push_addr_i     ({ptr_q[ADDR_W-1:2], 2'b00}),
    .push_data_i     (src_line[WORD_W*ptr_q[OFFS_W-1:2] +: WORD_W]),
    .pop_i           (instr_ready_i),
    .redirect_i      (redir),
    .redirect_addr_i (redir_addr),
    .redirect_hit_o  (fifo_hit),
    .valid_o         (instr_valid_o),
    .addr_o          (instr_addr_o),
    .data_o          (instr_rdata_o),
    .full_o          (fifo_full)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      started_q   <= 1'b0;
      ptr_q       <= '0;
      l0_line_q   <= '0;
      l0_addr_q   <= '0;
      l0_vld_q    <= 1'b0;
      pend_q      <= 1'b0;
      pend_addr_q <= '0;
      br_q        <= 1'b0;
      br_addr_q   <= '0;
    end else begin
      br_q      <= branch_i && started_q;
      br_addr_q <= branch_addr_i;
      if (!started_q) begin
        if (fetch_en_i) begin
          started_q <= 1'b1;
          ptr_q     <= {boot_addr_i[ADDR_W-1:2], 2'b00};
        end
      end else begin
        if (fetch_req_o && fetch_gnt_i) begin
          pend_q      <= 1'b1;
          pend_addr_q <= fetch_addr_o;
        end else if (fetch_rvalid_i && pend_q) begin
          pend_q    <= 1'b0;
          l0_line_q <= fetch_rdata_i;
          l0_addr_q <= pend_addr_q;
          l0_vld_q  <= 1'b1;
        end
        if (redir) begin
          if (!fifo_hit) ptr_q <= {redir_addr[ADDR_W-1:2], 2'b00};
        end else if (push) begin
          ptr_q <= ptr_q + ADDR_W'(4);
        end
      end
    end
  end

  a_req_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    fetch_req_o && !fetch_gnt_i && !redir |=> fetch_req_o);

endmodule
