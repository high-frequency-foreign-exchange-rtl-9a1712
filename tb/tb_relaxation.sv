// tb_relaxation: random candidates against random destination weights;
// each lane must request a write exactly when it is valid and its update
// value is below w(j), carrying j, the smaller weight and i as predecessor.
module tb_relaxation;
  import fx_pkg::*;

  edge_cand_t cand [P];
  logic [P-1:0] valid;
  dist_t w_dst [P];
  logic [P-1:0] wr_en;
  idx_t wr_idx [P];
  dist_t wr_w [P];
  idx_t wr_pred [P];
  logic [$clog2(P+1)-1:0] n_updates;
  int checks = 0, failures = 0;

  relaxation dut (.cand, .valid, .w_dst, .wr_en, .wr_idx, .wr_w, .wr_pred, .n_updates);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int exp_n;
      for (int k = 0; k < P; k++) begin
        cand[k].upd = 1'b1;
        cand[k].dst = idx_t'($urandom_range(0, 65));
        cand[k].src = idx_t'($urandom_range(0, 65));
        cand[k].wu  = dist_t'($signed($urandom_range(0, 2000)) - 1000);
        w_dst[k]    = ($urandom_range(0, 7) == 0) ? DIST_INF
                                                   : dist_t'($signed($urandom_range(0, 2000)) - 1000);
        valid[k]    = ($urandom_range(0, 3) != 0);
      end
      #1;
      exp_n = 0;
      for (int k = 0; k < P; k++) begin
        bit e;
        e = valid[k] && ($signed(cand[k].wu) < $signed(w_dst[k]));
        exp_n += int'(e);
        checks++;
        if (wr_en[k] !== e || (e && (wr_idx[k] != cand[k].dst || wr_w[k] != cand[k].wu ||
                                    wr_pred[k] != cand[k].src))) begin
          failures++;
          $display("FAIL lane %0d wu=%0d wj=%0d valid=%b en=%b", k, cand[k].wu, w_dst[k], valid[k], wr_en[k]);
        end
      end
      checks++;
      if (int'(n_updates) != exp_n) failures++;
    end
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
