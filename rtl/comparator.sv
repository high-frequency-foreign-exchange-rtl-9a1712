// comparator: compare-exchange cell of the edge sorting network.
//
// Takes two edge candidates e0 (a_in) and e1 (b_in). The candidate that the
// selection rule returns goes to lo_out, the other one to hi_out:
//   both valid, same destination : the one with the smaller update value
//                                  (e1 on a tie); the other loses its
//                                  update bit, so each destination keeps
//                                  only its cheapest candidate;
//   both valid, other destination: the one with the smaller destination;
//   only one valid               : the valid one;
//   neither valid                : e0.
// Valid candidates therefore tend to move up, by destination. The selection
// rule and the clearing of the update bit follow the design description;
// routing the second edge to hi_out is what makes the cell usable in a
// sorting network. Purely combinational.
module comparator
  import fx_pkg::*;
(
  input  edge_cand_t a_in,
  input  edge_cand_t b_in,
  output edge_cand_t lo_out,
  output edge_cand_t hi_out
);

  logic pick_a;     // a is the returned edge
  logic kill_loser; // same destination, both valid: the loser is dropped

  always_comb begin
    kill_loser = 1'b0;
    if (a_in.upd && b_in.upd) begin
      if (a_in.dst == b_in.dst) begin
        pick_a     = (a_in.wu < b_in.wu);
        kill_loser = 1'b1;
      end else begin
        pick_a     = (a_in.dst < b_in.dst);
      end
    end else if (a_in.upd != b_in.upd) begin
      pick_a = a_in.upd;
    end else begin
      pick_a = 1'b1;
    end

    lo_out = pick_a ? a_in : b_in;
    hi_out = pick_a ? b_in : a_in;
    if (kill_loser) hi_out.upd = 1'b0;
  end

endmodule
