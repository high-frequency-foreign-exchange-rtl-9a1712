// tb_fx_pkg: checks the shared sizes and sentinels: the reserved "no edge"
// code is the most negative 16-bit weight, INFINITY is the largest positive
// path weight and survives adding any edge weight without wrapping, NULL is
// the all-ones index, and the candidate word carries the update bit on top.
module tb_fx_pkg;
  import fx_pkg::*;

  int checks = 0, failures = 0;

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    edge_cand_t c;
    dist_t s;
    expect_true(P == 4, "four edges per clock");
    expect_true(EDGE_W == 16 && $bits(edge_w_t) == 16, "16-bit edge weight");
    expect_true(IDX_W == 7 && $bits(idx_t) == 7, "7-bit vertex index");
    expect_true(int'(NO_EDGE) == -32768, "no-edge code");
    expect_true(DIST_INF > 0 && DIST_INF + 1 < 0, "INFINITY is the largest path weight");
    s = DIST_INF - dist_t'(32767);
    expect_true(s > 0 && s + dist_t'(32767) == DIST_INF, "INFINITY headroom");
    expect_true(IDX_NULL == 7'h7f, "NULL index");
    expect_true($bits(edge_cand_t) == 1 + 2 * IDX_W + DIST_W, "candidate word width");
    c = '0;
    c.upd = 1'b1;
    expect_true(c[$bits(edge_cand_t)-1] == 1'b1, "update bit is the top bit");
    c = '0;
    c.wu = dist_t'(-5);
    expect_true(c[DIST_W-1:0] == dist_t'(-5), "update value in the low bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
