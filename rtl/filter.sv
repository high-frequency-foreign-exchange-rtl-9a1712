// filter: decides which sorted edge candidates go to relaxation.
//
// Reads the update bit of each of the P words leaving the sorting network
// and raises Valid for the words still marked as candidates. n_valid counts
// them: the number of relaxation lanes the group actually needs. As a
// guard that keeps vertex-table writes atomic, a word whose destination
// equals that of an earlier valid word is not passed as valid (the sorting
// network already removes such duplicates, so in normal operation this
// never fires; dup_seen reports it if it does). The Valid-per-word function
// follows the design description; the duplicate guard and the count output
// width are this design's own. Purely combinational.
module filter
  import fx_pkg::*;
(
  input  edge_cand_t             in_words  [P],
  output edge_cand_t             out_words [P],
  output logic [P-1:0]           valid,
  output logic [$clog2(P+1)-1:0] n_valid,
  output logic                   dup_seen
);

  always_comb begin
    valid    = '0;
    n_valid  = '0;
    dup_seen = 1'b0;
    for (int k = 0; k < P; k++) begin
      logic dup;
      dup = 1'b0;
      for (int m = 0; m < k; m++)
        if (valid[m] && in_words[m].dst == in_words[k].dst) dup = 1'b1;
      valid[k] = in_words[k].upd && !dup;
      if (in_words[k].upd && dup) dup_seen = 1'b1;
      n_valid  = n_valid + $clog2(P+1)'(valid[k]);
    end
    out_words = in_words;
  end

endmodule
