// Round-robin arbiter over N requesters. gnt_o is one-hot (or zero), idx_o
// its index. Priority starts just after the requester granted last; the
// pointer moves only when the grant is used (ack_i), so a stalled grant keeps
// its place. Combinational grant, registered pointer.
module rr_arbiter #(
  parameter int unsigned N = 8,
  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic [N-1:0]      req_i,
  input  logic              ack_i,
  output logic [N-1:0]      gnt_o,
  output logic [IDX_W-1:0]  idx_o
);
  logic [IDX_W-1:0] last_q;

  always_comb begin
    logic found;
    found = 1'b0;
    gnt_o = '0;
    idx_o = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned c;
      c = (int'(last_q) + k) % N;
      if (!found && req_i[c]) begin
        found    = 1'b1;
        gnt_o[c] = 1'b1;
        idx_o    = IDX_W'(c);
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)                last_q <= IDX_W'(N - 1);
    else if (ack_i && |gnt_o)   last_q <= idx_o;
  end
endmodule
