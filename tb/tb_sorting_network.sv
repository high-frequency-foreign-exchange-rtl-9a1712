// tb_sorting_network: random groups of four edge candidates with clashing
// destinations. Checks that, for every destination, exactly its cheapest
// valid input stays valid at the output, and that the number of valid
// outputs equals the number of distinct destinations among valid inputs.
module tb_sorting_network;
  import fx_pkg::*;

  edge_cand_t in_w [P];
  edge_cand_t out_w [P];
  int checks = 0, failures = 0;
  int dup_groups = 0;

  sorting_network dut (.in_words(in_w), .out_words(out_w));

  initial begin
    for (int n = 0; n < 5000; n++) begin
      dist_t best [4];
      bit    has  [4];
      int    exp_n, got_n;
      int    perm [P];
      // distinct update values so the cheapest candidate is unique
      for (int k = 0; k < P; k++) perm[k] = k;
      perm.shuffle();
      for (int k = 0; k < 4; k++) has[k] = 0;
      for (int k = 0; k < P; k++) begin
        in_w[k].upd = ($urandom_range(0, 3) != 0);
        in_w[k].dst = idx_t'($urandom_range(0, 3));
        in_w[k].src = idx_t'(k);
        in_w[k].wu  = dist_t'(perm[k] * 7 - 9);
      end
      for (int k = 0; k < P; k++)
        for (int m = k + 1; m < P; m++)
          if (in_w[k].upd && in_w[m].upd && in_w[k].dst == in_w[m].dst) dup_groups++;
      #1;
      for (int k = 0; k < P; k++)
        if (in_w[k].upd) begin
          if (!has[in_w[k].dst] || in_w[k].wu < best[in_w[k].dst]) best[in_w[k].dst] = in_w[k].wu;
          has[in_w[k].dst] = 1;
        end
      exp_n = 0;
      for (int d = 0; d < 4; d++) exp_n += int'(has[d]);
      got_n = 0;
      for (int k = 0; k < P; k++) got_n += int'(out_w[k].upd);
      checks++;
      if (got_n != exp_n) begin
        failures++;
        $display("FAIL count in=%p out=%p", in_w, out_w);
      end
      for (int d = 0; d < 4; d++) begin
        int hits;
        hits = 0;
        for (int k = 0; k < P; k++)
          if (out_w[k].upd && out_w[k].dst == idx_t'(d)) begin
            hits++;
            if (out_w[k].wu != best[d]) begin
              failures++;
              $display("FAIL dst %0d kept a costlier candidate in=%p out=%p", d, in_w, out_w);
            end
          end
        checks++;
        if (hits != int'(has[d])) begin
          failures++;
          $display("FAIL dst %0d has %0d valid outputs in=%p out=%p", d, hits, in_w, out_w);
        end
      end
    end
    checks++;
    if (dup_groups == 0) failures++;
    $display("groups with clashing destinations: %0d", dup_groups);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
