// vertex_table: weight w(x) and predecessor p(x) of every vertex.
//
// init loads the starting values of Bellman-Ford: w = 0 at the source
// vertex and INFINITY elsewhere, every predecessor NULL. The table is held
// in flip-flops so that, in the same clock, P source weights w(i) and P
// destination weights w(j) can be read combinationally and P relaxation
// writes can land (on the next clock edge). A predecessor read port serves
// the decision maker. Writes to distinct vertices are expected; if two
// lanes hit one vertex the higher lane wins. init has priority over writes.
// The stored fields follow the design description; the port counts and the
// flip-flop storage are this design's own.
module vertex_table
  import fx_pkg::*;
#(
  parameter int V = 66
)(
  input  logic         clk,
  input  logic         init,
  input  idx_t         src,
  input  idx_t         rd_src_idx [P],
  output dist_t        rd_src_w   [P],
  input  idx_t         rd_dst_idx [P],
  output dist_t        rd_dst_w   [P],
  input  logic [P-1:0] wr_en,
  input  idx_t         wr_idx  [P],
  input  dist_t        wr_w    [P],
  input  idx_t         wr_pred [P],
  input  idx_t         pr_idx,
  output idx_t         pr_pred,
  output dist_t        pr_w
);

  dist_t w_q [V];
  idx_t  p_q [V];

  always_ff @(posedge clk) begin
    if (init) begin
      for (int x = 0; x < V; x++) begin
        w_q[x] <= (idx_t'(x) == src) ? dist_t'(0) : DIST_INF;
        p_q[x] <= IDX_NULL;
      end
    end else begin
      for (int k = 0; k < P; k++) begin
        if (wr_en[k] && int'(wr_idx[k]) < V) begin
          w_q[wr_idx[k]] <= wr_w[k];
          p_q[wr_idx[k]] <= wr_pred[k];
        end
      end
    end
  end

  always_comb begin
    for (int k = 0; k < P; k++) begin
      rd_src_w[k] = (int'(rd_src_idx[k]) < V) ? w_q[rd_src_idx[k]] : DIST_INF;
      rd_dst_w[k] = (int'(rd_dst_idx[k]) < V) ? w_q[rd_dst_idx[k]] : DIST_INF;
    end
    pr_pred = (int'(pr_idx) < V) ? p_q[pr_idx] : IDX_NULL;
    pr_w    = (int'(pr_idx) < V) ? w_q[pr_idx] : DIST_INF;
  end

endmodule
