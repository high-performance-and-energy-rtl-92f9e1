// Ring FIFO of instruction words between the L0 line buffer and the decoder.
//
// DEPTH entries of 32 bits, each stored with its word address. The read
// pointer marks the next useful word, the write pointer the next free slot.
// The FIFO counts as full when DEPTH-1 or more useful words are held, so the
// slot under the write pointer is never a useful one and the request logic in
// front of it can look only at this registered state.
//
// Words are always written in address order from one start address, so the
// valid entries form one sequential run. A redirect (taken branch or jump)
// whose word address matches a stored entry other than the write slot just
// moves the read pointer there: the ring then acts as a tiny cache for short
// loops. Any other redirect clears the ring. A push in the same cycle as a
// redirect is ignored; the writer repeats it.
//
// Interface: push_i/push_addr_i/push_data_i (taken when !full_o and no
// redirect), pop_i consumes the head shown on valid_o/addr_o/data_o,
// redirect_i/redirect_addr_i with redirect_hit_o (combinational) telling
// whether the target was found. All state changes at the rising clock edge.
//
// The 4 x 32-bit size, the pointer roles, the DEPTH-1 full rule and the
// short-branch hit are taken from the design description; clearing on a
// missed redirect and ignoring a concurrent push are choices of this design.
module fetch_ring_fifo #(
  parameter int unsigned DEPTH = 4
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  input  logic                push_i,
  input  icache_pkg::addr_t   push_addr_i,
  input  icache_pkg::word_t   push_data_i,
  input  logic                pop_i,
  input  logic                redirect_i,
  input  icache_pkg::addr_t   redirect_addr_i,
  output logic                redirect_hit_o,
  output logic                valid_o,
  output icache_pkg::addr_t   addr_o,
  output icache_pkg::word_t   data_o,
  output logic                full_o
);
  import icache_pkg::*;

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  addr_t             ent_addr [DEPTH];
  word_t             ent_data [DEPTH];
  logic [DEPTH-1:0]  ent_vld;
  logic [PTR_W-1:0]  rd_ptr, wr_ptr;
  logic [CNT_W-1:0]  count;

  logic [PTR_W-1:0]  hit_idx;
  addr_t             tgt;

  assign tgt = {redirect_addr_i[ADDR_W-1:2], 2'b00};

  always_comb begin
    redirect_hit_o = 1'b0;
    hit_idx        = '0;
    for (int unsigned k = 0; k < DEPTH; k++) begin
      if (ent_vld[k] && ent_addr[k] == tgt && PTR_W'(k) != wr_ptr) begin
        redirect_hit_o = 1'b1;
        hit_idx        = PTR_W'(k);
      end
    end
  end

  function automatic logic [PTR_W-1:0] inc(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  // Distance from a to b going forward around the ring.
  function automatic logic [CNT_W-1:0] ring_dist(logic [PTR_W-1:0] a, logic [PTR_W-1:0] b);
    return (b >= a) ? CNT_W'(b - a) : CNT_W'(DEPTH) - CNT_W'(a - b);
  endfunction

  assign full_o  = count >= CNT_W'(DEPTH - 1);
  assign valid_o = count != '0;
  assign addr_o  = ent_addr[rd_ptr];
  assign data_o  = ent_data[rd_ptr];

  logic do_push, do_pop;
  assign do_push = push_i && !full_o && !redirect_i;
  assign do_pop  = pop_i && valid_o && !redirect_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rd_ptr  <= '0;
      wr_ptr  <= '0;
      count   <= '0;
      ent_vld <= '0;
      for (int unsigned k = 0; k < DEPTH; k++) begin
        ent_addr[k] <= '0;
        ent_data[k] <= '0;
      end
    end else if (redirect_i) begin
      if (redirect_hit_o) begin
        rd_ptr <= hit_idx;
        count  <= ring_dist(hit_idx, wr_ptr);
      end else begin
        rd_ptr  <= '0;
        wr_ptr  <= '0;
        count   <= '0;
        ent_vld <= '0;
      end
    end else begin
      if (do_push) begin
        ent_addr[wr_ptr] <= push_addr_i;
        ent_data[wr_ptr] <= push_data_i;
        ent_vld[wr_ptr]  <= 1'b1;
        wr_ptr           <= inc(wr_ptr);
      end
      if (do_pop) rd_ptr <= inc(rd_ptr);
      count <= count + CNT_W'(do_push) - CNT_W'(do_pop);
    end
  end

  a_count_le_depth: assert property (@(posedge clk_i) disable iff (!rst_ni) count < CNT_W'(DEPTH));

endmodule
