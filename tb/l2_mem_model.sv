// Behavioural model of the cluster-external L2 instruction memory as seen
// through the refill port: accepts one line request per cycle, answers each
// LAT cycles later (plus up to JITTER random cycles, so answers may come out
// of order) with the line given by tb_pkg::mem_line and the request's ID,
// holding the answer until rready. Counts requests. Not synthesizable.
module l2_mem_model #(
  parameter int unsigned LAT    = 15,
  parameter int unsigned JITTER = 0,
  parameter int unsigned ID_W   = 3
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  input  logic                req_i,
  input  icache_pkg::addr_t   addr_i,
  input  logic [ID_W-1:0]     id_i,
  output logic                gnt_o,
  output logic                rvalid_o,
  output icache_pkg::line_t   rdata_o,
  output logic [ID_W-1:0]     rid_o,
  input  logic                rready_i,
  output int                  n_req_o
);
  import icache_pkg::*;

  typedef struct { addr_t addr; logic [ID_W-1:0] id; longint due; } pend_t;
  pend_t  q[$];
  longint cyc;

  assign gnt_o = req_i;

  always @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cyc      <= 0;
      rvalid_o <= 1'b0;
      rdata_o  <= '0;
      rid_o    <= '0;
      n_req_o  <= 0;
      q.delete();
    end else begin
      cyc <= cyc + 1;
      if (req_i) begin
        pend_t p;
        p.addr = addr_i;
        p.id   = id_i;
        p.due  = cyc + LAT - 1 + ((JITTER > 0) ? longint'($urandom % (JITTER + 1)) : 0);
        q.push_back(p);
        n_req_o <= n_req_o + 1;
      end
      if (!rvalid_o || rready_i) begin
        rvalid_o <= 1'b0;
        foreach (q[i]) begin
          if (q[i].due <= cyc) begin
            rvalid_o <= 1'b1;
            rdata_o  <= tb_pkg::mem_line(q[i].addr);
            rid_o    <= q[i].id;
            q.delete(i);
            break;
          end
        end
      end
    end
  end
endmodule
