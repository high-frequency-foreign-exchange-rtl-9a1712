// tb_bf_controller: V = 5 (25 edges, 7 groups). Follows a run with and
// without a detected cycle: V-1 relaxation sweeps then one detection sweep,
// each issuing groups 0..NG-1 in order with the matching first edge (i,j),
// the vertex-table init before them, the decision-maker handshake, busy and
// done, and the clock count of a run.
module tb_bf_controller;
  import fx_pkg::*;

  localparam int V = 5;
  localparam int NG = (V*V + P - 1) / P;
  localparam int GA_W = $clog2(NG);
  localparam int DRAIN = 3;

  logic clk = 0, rst = 1, start = 0;
  logic vt_init, issue, detect, det_clear, dm_start, busy, done;
  logic [GA_W-1:0] rd_group;
  idx_t src0, dst0;
  logic found = 0, dm_done = 0;
  logic [15:0] sweep_cnt;
  int checks = 0, failures = 0;

  bf_controller #(.V(V)) dut (.*);

  always #5 clk = ~clk;

  task automatic run(input bit with_cycle);
    int clocks, inits, relax_issues, det_issues, expect_g, dm_starts;
    clocks = 0; inits = 0; relax_issues = 0; det_issues = 0; expect_g = 0; dm_starts = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    found = 0;
    while (!done && clocks < 2000) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low during run"); end
      if (vt_init) begin inits++; expect_g = 0; end
      if (det_clear) found = 0;
      if (issue) begin
        int e;
        e = expect_g * P;
        checks++;
        if (int'(rd_group) != expect_g || int'(src0) != e % V || int'(dst0) != e / V) begin
          failures++;
          $display("FAIL issue group %0d (exp %0d) src0 %0d dst0 %0d", rd_group, expect_g, src0, dst0);
        end
        expect_g = (expect_g + 1) % NG;
        if (detect) begin
          det_issues++;
          if (with_cycle && det_issues == 3) found = 1;
        end else relax_issues++;
      end
      if (dm_start) begin
        dm_starts++;
        fork begin repeat (6) @(negedge clk); dm_done = 1; @(negedge clk); dm_done = 0; end join_none
      end
      @(negedge clk);
      clocks++;
    end
    checks += 5;
    if (inits != 1) begin failures++; $display("FAIL inits %0d", inits); end
    if (relax_issues != (V - 1) * NG) begin failures++; $display("FAIL relax issues %0d", relax_issues); end
    if (det_issues != NG) begin failures++; $display("FAIL detect issues %0d", det_issues); end
    if (dm_starts != int'(with_cycle)) begin failures++; $display("FAIL dm starts %0d", dm_starts); end
    // init + V sweeps of NG issues and DRAIN idle clocks (+ DECIDE and six WAIT clocks)
    if (clocks != 1 + V * (NG + DRAIN) + (with_cycle ? 7 : 0)) begin
      failures++; $display("FAIL run took %0d clocks", clocks);
    end
    checks++;
    if (busy) failures++;
    repeat (3) @(negedge clk);
    checks++;
    if (!done) begin failures++; $display("FAIL done not held"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    run(0);
    run(1);
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
