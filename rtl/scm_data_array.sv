// Data store of a set-associative cache: SETS x WAYS lines of WIDTH bits with
// one combinational read port (set and way) and one synchronous write port,
// the organisation of a standard-cell (latch) memory. Lines are not reset:
// a line is only read after its tag has been written valid, which happens in
// the same cycle as the line itself. A read in the cycle of a write to the
// same entry returns the old contents.
module scm_data_array #(
  parameter int unsigned SETS  = 8,
  parameter int unsigned WAYS  = 4,
  parameter int unsigned WIDTH = 128,
  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic              clk_i,
  input  logic [IDX_W-1:0]  rd_idx_i,
  input  logic [WAY_W-1:0]  rd_way_i,
  output logic [WIDTH-1:0]  rd_data_o,
  input  logic              we_i,
  input  logic [IDX_W-1:0]  w_idx_i,
  input  logic [WAY_W-1:0]  w_way_i,
  input  logic [WIDTH-1:0]  w_data_i
);
  logic [WIDTH-1:0] mem_q [SETS*WAYS];

  assign rd_data_o = mem_q[{rd_idx_i, rd_way_i}];

  always_ff @(posedge clk_i) begin
    if (we_i) mem_q[{w_idx_i, w_way_i}] <= w_data_i;
  end
endmodule
