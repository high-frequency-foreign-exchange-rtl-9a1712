// relax_lane: one relaxation lane.
//
// A less-than comparator checks whether the candidate's update value
// w(i) + w(i,j) is below the destination's current weight w(j). A mux
// passes the smaller of the two as the new weight, and an AND of the
// comparison with the update signal (the filter's Valid) gives the write
// enable. i becomes the new predecessor of j. Built from the comparator,
// mux and AND of the design's relaxation-lane figure. Combinational.
module relax_lane
  import fx_pkg::*;
(
  input  dist_t wu,       // w(i,j) + w(i)
  input  dist_t w_dst,    // w(j)
  input  logic  upd,      // update signal (Valid)
  input  idx_t  src,      // i
  input  idx_t  dst,      // j
  output logic  wr_en,
  output idx_t  wr_idx,
  output dist_t wr_w,
  output idx_t  wr_pred
);

  logic less;

  always_comb begin
    less    = (wu < w_dst);
    wr_w    = less ? wu : w_dst;
    wr_en   = less & upd;
    wr_idx  = dst;
    wr_pred = src;
  end

endmodule
