// cycle_detector: final Bellman-Ford sweep that looks for a negative cycle.
//
// After V-1 relaxation sweeps every shortest path is known, so an edge that
// can still shorten its destination (w(j) > w(i) + w(i,j)) proves a
// negative-weight cycle, i.e. an arbitrage loop. During the detection sweep
// (check = 1) the detector sees the same P filtered candidates per clock as
// the relaxation lanes, with w(j) of each, and tests all P in parallel.
// clear starts a new sweep. The lowest lane of the first group with a
// relaxable edge is latched into found_src / found_dst / found_w, and in that
// same clock fix_en asks for that single relaxation (w(j) = found value,
// p(j) = i) to be written into the vertex table, so that following
// predecessors from j leads into the cycle. found stays high until clear.
// The check itself follows the design description; latching the first
// edge and applying its relaxation are this design's own choices.
module cycle_detector
  import fx_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         clear,
  input  logic         check,
  input  edge_cand_t   cand  [P],
  input  logic [P-1:0] valid,
  input  dist_t        w_dst [P],
  output logic         fix_en,
  output idx_t         fix_idx,
  output dist_t        fix_w,
  output idx_t         fix_pred,
  output logic         found,
  output idx_t         found_src,
  output idx_t         found_dst,
  output dist_t        found_w
);

  logic [P-1:0] hit;
  logic         any_hit;
  int           first;

  always_comb begin
    first = 0;
    for (int k = 0; k < P; k++) hit[k] = check && valid[k] && (cand[k].wu < w_dst[k]);
    any_hit = |hit;
    for (int k = P-1; k >= 0; k--) if (hit[k]) first = k;
    fix_en   = any_hit && !found && !clear;
    fix_idx  = cand[first].dst;
    fix_w    = cand[first].wu;
    fix_pred = cand[first].src;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      found     <= 1'b0;
      found_src <= IDX_NULL;
      found_dst <= IDX_NULL;
      found_w   <= '0;
    end else if (fix_en) begin
      found     <= 1'b1;
      found_src <= fix_pred;
      found_dst <= fix_idx;
      found_w   <= fix_w;
    end
  end

endmodule
