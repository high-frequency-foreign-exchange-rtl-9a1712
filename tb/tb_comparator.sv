// tb_comparator: random and corner-case check of the compare-exchange cell
// against an independent model of its selection rule.
module tb_comparator;
  import fx_pkg::*;

  edge_cand_t a, b, lo, hi;
  int checks = 0, failures = 0;

  comparator dut (.a_in(a), .b_in(b), .lo_out(lo), .hi_out(hi));

  function automatic edge_cand_t rnd_cand();
    edge_cand_t c;
    c.upd = 1'($urandom);
    c.dst = idx_t'($urandom_range(0, 3));
    c.src = idx_t'($urandom_range(0, 65));
    c.wu  = dist_t'($signed($urandom_range(0, 20)) - 10);
    return c;
  endfunction

  task automatic check_one();
    edge_cand_t exp_lo, exp_hi;
    bit first_wins;
    #1;
    if (a.upd && b.upd && a.dst == b.dst) first_wins = a.wu < b.wu;
    else if (a.upd && b.upd)              first_wins = a.dst < b.dst;
    else if (a.upd || b.upd)              first_wins = a.upd;
    else                                  first_wins = 1;
    exp_lo = first_wins ? a : b;
    exp_hi = first_wins ? b : a;
    if (a.upd && b.upd && a.dst == b.dst) exp_hi.upd = 0;
    checks++;
    if (lo !== exp_lo || hi !== exp_hi) begin
      failures++;
      $display("FAIL a=%p b=%p lo=%p hi=%p", a, b, lo, hi);
    end
  endtask

  initial begin
    // the example of the selection rule: same destination, cheaper wins
    a = '{upd:1, dst:5, src:1, wu:-3}; b = '{upd:1, dst:5, src:2, wu:4};
    check_one();
    if (!(lo.src == 1 && hi.upd == 0)) failures++;
    checks++;
    for (int n = 0; n < 4000; n++) begin
      a = rnd_cand(); b = rnd_cand();
      check_one();
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
