// sorting_network: static 4-input bitonic network of six comparator cells.
//
// The four edge candidates loaded in one clock pass three columns of two
// compare-exchange cells: (0,1)(2,3), then (0,3)(1,2), then (0,1)(2,3).
// Every cell drops the costlier of two valid candidates for the same
// destination. Any two inputs with the same destination meet in some cell
// on their way through, so at the output each destination keeps exactly its
// cheapest valid candidate. A dropped word may sit between valid ones: the
// output is not fully ordered, and it need not be, since the filter looks at
// the update bit of every word.
// Six cells in three columns follow the design's figure; the pairing of
// the middle column is the usual same-direction bitonic one and is this
// design's choice. Purely combinational.
module sorting_network
  import fx_pkg::*;
(
  input  edge_cand_t in_words  [P],
  output edge_cand_t out_words [P]
);

  edge_cand_t s1 [P];
  edge_cand_t s2 [P];

  // column 1
  comparator u_c10 (.a_in(in_words[0]), .b_in(in_words[1]), .lo_out(s1[0]), .hi_out(s1[1]));
  comparator u_c11 (.a_in(in_words[2]), .b_in(in_words[3]), .lo_out(s1[2]), .hi_out(s1[3]));
  // column 2
  comparator u_c20 (.a_in(s1[0]), .b_in(s1[3]), .lo_out(s2[0]), .hi_out(s2[3]));
  comparator u_c21 (.a_in(s1[1]), .b_in(s1[2]), .lo_out(s2[1]), .hi_out(s2[2]));
  // column 3
  comparator u_c30 (.a_in(s2[0]), .b_in(s2[1]), .lo_out(out_words[0]), .hi_out(out_words[1]));
  comparator u_c31 (.a_in(s2[2]), .b_in(s2[3]), .lo_out(out_words[2]), .hi_out(out_words[3]));

endmodule
