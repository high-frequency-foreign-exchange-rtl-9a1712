// tb_cycle_detector: feeds sweeps of random candidate groups. The detector
// must latch the first relaxable valid edge of the sweep (lowest lane of the
// first such group), request exactly one fix write for it in that clock,
// ignore groups while check is low, and forget it on clear.
module tb_cycle_detector;
  import fx_pkg::*;

  logic clk = 0, rst = 1, clear = 0, check = 0;
  edge_cand_t cand [P];
  logic [P-1:0] valid = '0;
  dist_t w_dst [P];
  logic fix_en, found;
  idx_t fix_idx, fix_pred, found_src, found_dst;
  dist_t fix_w, found_w;
  int checks = 0, failures = 0;
  int fixes = 0, sweeps_found = 0, sweeps_clean = 0;

  cycle_detector dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (fix_en) fixes++;

  initial begin
    for (int k = 0; k < P; k++) begin cand[k] = '0; w_dst[k] = '0; end
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int s = 0; s < 60; s++) begin
      bit exp_found;
      idx_t exp_src, exp_dst;
      dist_t exp_w;
      int fixes0;
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      checks++;
      if (found) failures++;
      exp_found = 0; exp_src = '0; exp_dst = '0; exp_w = '0;
      fixes0 = fixes;
      for (int g = 0; g < 20; g++) begin
        check = ($urandom_range(0, 9) != 0);
        for (int k = 0; k < P; k++) begin
          cand[k].upd = 1'b1;
          cand[k].dst = idx_t'($urandom_range(0, 65));
          cand[k].src = idx_t'($urandom_range(0, 65));
          cand[k].wu  = dist_t'($urandom_range(0, 1000));
          // relaxable edges are rare: mostly w(j) is already the smaller
          w_dst[k]    = ($urandom_range(0, 20 + s * 4) == 0) ? cand[k].wu + 1 : cand[k].wu;
          valid[k]    = 1'($urandom);
        end
        if (check && !exp_found)
          for (int k = P-1; k >= 0; k--)
            if (valid[k] && cand[k].wu < w_dst[k]) begin
              exp_found = 1; exp_src = cand[k].src; exp_dst = cand[k].dst; exp_w = cand[k].wu;
            end
        @(negedge clk);
      end
      check = 0;
      @(negedge clk);
      checks++;
      if (found !== exp_found || (exp_found && (found_src != exp_src || found_dst != exp_dst ||
                                                found_w != exp_w))) begin
        failures++;
        $display("FAIL sweep %0d found=%b exp=%b src %0d/%0d dst %0d/%0d", s, found, exp_found,
                 found_src, exp_src, found_dst, exp_dst);
      end
      checks++;
      if (fixes - fixes0 != int'(exp_found)) begin failures++; $display("FAIL fix count"); end
      if (exp_found) sweeps_found++; else sweeps_clean++;
    end
    checks++;
    if (sweeps_found == 0 || sweeps_clean == 0) failures++;
    $display("sweeps with a cycle %0d, without %0d", sweeps_found, sweeps_clean);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
