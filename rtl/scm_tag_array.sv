// Tag store of a set-associative cache, written as a register array in the
// way a standard-cell (latch) memory is used: NRD independent combinational
// read ports that each return the tag and valid bit of every way of one set,
// and one synchronous write port. Valid bits clear on reset; tags are also
// reset so that nothing reads an undefined value.
//
// The L1 cache uses two read ports (core fetch lookup and prefetch probe),
// the L1.5 bank one. Write happens at the rising edge; a read in the same
// cycle sees the old contents.
module scm_tag_array #(
  parameter int unsigned SETS  = 8,
  parameter int unsigned WAYS  = 4,
  parameter int unsigned TAG_W = 25,
  parameter int unsigned NRD   = 2,
  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                        clk_i,
  input  logic                        rst_ni,
  input  logic [NRD-1:0][IDX_W-1:0]   rd_idx_i,
  output logic [NRD-1:0][WAYS-1:0][TAG_W-1:0] rd_tag_o,
  output logic [NRD-1:0][WAYS-1:0]    rd_vld_o,
  input  logic                        we_i,
  input  logic [IDX_W-1:0]            w_idx_i,
  input  logic [WAY_W-1:0]            w_way_i,
  input  logic [TAG_W-1:0]            w_tag_i
);
  logic [WAYS-1:0][TAG_W-1:0] tag_q [SETS];
  logic [WAYS-1:0]            vld_q [SETS];

  always_comb begin
    for (int unsigned p = 0; p < NRD; p++) begin
      rd_tag_o[p] = tag_q[rd_idx_i[p]];
      rd_vld_o[p] = vld_q[rd_idx_i[p]];
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int unsigned s = 0; s < SETS; s++) begin
        tag_q[s] <= '0;
        vld_q[s] <= '0;
      end
    end else if (we_i) begin
      tag_q[w_idx_i][w_way_i] <= w_tag_i;
      vld_q[w_idx_i][w_way_i] <= 1'b1;
    end
  end
endmodule
