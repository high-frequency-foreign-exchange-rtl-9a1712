// tb_filter: random words; Valid must equal the update bit except for a
// word repeating the destination of an earlier valid word, and n_valid must
// count the Valid flags.
module tb_filter;
  import fx_pkg::*;

  edge_cand_t in_w [P];
  edge_cand_t out_w [P];
  logic [P-1:0] valid;
  logic [$clog2(P+1)-1:0] n_valid;
  logic dup_seen;
  int checks = 0, failures = 0;
  int dups = 0;

  filter dut (.in_words(in_w), .out_words(out_w), .valid, .n_valid, .dup_seen);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [P-1:0] exp_v;
      int exp_n;
      bit exp_dup;
      for (int k = 0; k < P; k++) begin
        in_w[k].upd = 1'($urandom);
        in_w[k].dst = idx_t'($urandom_range(0, (n < 1500) ? 65 : 3));
        in_w[k].src = idx_t'($urandom_range(0, 65));
        in_w[k].wu  = dist_t'($urandom);
      end
      #1;
      exp_v = '0; exp_n = 0; exp_dup = 0;
      for (int k = 0; k < P; k++) begin
        bit seen;
        seen = 0;
        for (int m = 0; m < k; m++) if (exp_v[m] && in_w[m].dst == in_w[k].dst) seen = 1;
        exp_v[k] = in_w[k].upd && !seen;
        if (in_w[k].upd && seen) exp_dup = 1;
        exp_n += int'(exp_v[k]);
      end
      if (exp_dup) dups++;
      checks++;
      if (valid !== exp_v || int'(n_valid) != exp_n || dup_seen !== exp_dup || out_w != in_w) begin
        failures++;
        $display("FAIL in=%p valid=%b n=%0d exp=%b/%0d", in_w, valid, n_valid, exp_v, exp_n);
      end
    end
    checks++;
    if (dups == 0) failures++;
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
