// relaxation: the P relaxation lanes of the edge pipeline.
//
// Each lane (relax_lane) receives one filtered candidate together with the
// current weight w(j) of its destination and requests a vertex-table write
// when the candidate is valid and shorter. Since the filter leaves at most
// one valid candidate per destination, the P writes address distinct
// vertices. n_updates counts the writes requested in this clock. Lane
// structure follows the design's figure; the counter output is this
// design's own. Combinational.
module relaxation
  import fx_pkg::*;
(
  input  edge_cand_t             cand    [P],
  input  logic [P-1:0]           valid,
  input  dist_t                  w_dst   [P],
  output logic [P-1:0]           wr_en,
  output idx_t                   wr_idx  [P],
  output dist_t                  wr_w    [P],
  output idx_t                   wr_pred [P],
  output logic [$clog2(P+1)-1:0] n_updates
);

  for (genvar k = 0; k < P; k++) begin : g_lane
    relax_lane u_lane (
      .wu     (cand[k].wu),
      .w_dst  (w_dst[k]),
      .upd    (valid[k]),
      .src    (cand[k].src),
      .dst    (cand[k].dst),
      .wr_en  (wr_en[k]),
      .wr_idx (wr_idx[k]),
      .wr_w   (wr_w[k]),
      .wr_pred(wr_pred[k])
    );
  end

  always_comb begin
    n_updates = '0;
    for (int k = 0; k < P; k++) n_updates = n_updates + $clog2(P+1)'(wr_en[k]);
  end

endmodule
