// tb_decision_maker: V = 10. Builds predecessor arrays that hold a cycle
// reached through a tail of other vertices, or no cycle at all, and checks
// the trade stream: one trade per cycle edge, in execution order (each
// trade buys what the next one sells), closing the loop, with trade_last on
// the final one, and done / cycle_ok / cycle_len.
module tb_decision_maker;
  import fx_pkg::*;

  localparam int V = 10;

  logic clk = 0, rst = 1, start = 0;
  idx_t start_vertex = '0;
  idx_t pr_idx, pr_pred;
  logic trade_valid, trade_last, done, cycle_ok;
  idx_t trade_from, trade_to, cycle_len;
  idx_t pred [V];
  int checks = 0, failures = 0;
  int with_cycle = 0, without_cycle = 0;

  decision_maker #(.V(V)) dut (.*);

  assign pr_pred = (int'(pr_idx) < V) ? pred[pr_idx] : IDX_NULL;

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 200; t++) begin
      int perm [V];
      int clen, tail, cyc_start;
      bit on_cycle [V];
      int n_tr, cycles;
      idx_t first_from, prev_to;
      bit has_cycle;
      for (int x = 0; x < V; x++) begin perm[x] = x; pred[x] = IDX_NULL; on_cycle[x] = 0; end
      perm.shuffle();
      has_cycle = ($urandom_range(0, 4) != 0);
      clen = $urandom_range(1, 6);
      tail = $urandom_range(0, V - clen);
      // cycle perm[0] -> perm[1] -> ... -> perm[clen-1] -> perm[0] (trade order),
      // so pred[perm[k]] = perm[k-1]
      for (int k = 0; k < clen; k++) begin
        pred[perm[k]] = idx_t'(perm[(k + clen - 1) % clen]);
        on_cycle[perm[k]] = 1;
      end
      if (!has_cycle) pred[perm[0]] = IDX_NULL;
      // tail: perm[clen+m] hangs off the previous vertex
      for (int m = 0; m < tail; m++) pred[perm[clen + m]] = idx_t'(perm[clen + m - 1]);
      cyc_start = (tail > 0) ? perm[clen + tail - 1] : perm[0];
      @(negedge clk);
      start = 1; start_vertex = idx_t'(cyc_start);
      @(negedge clk);
      start = 0;
      n_tr = 0; cycles = 0; first_from = '0; prev_to = '0;
      while (!done && cycles < 4 * V + 20) begin
        if (trade_valid) begin
          checks++;
          if (!on_cycle[trade_from] || pred[trade_to] != trade_from) begin
            failures++;
            $display("FAIL trade %0d -> %0d is not a cycle edge", trade_from, trade_to);
          end
          if (n_tr == 0) first_from = trade_from;
          else if (trade_from != prev_to) begin failures++; $display("FAIL trades not chained"); end
          prev_to = trade_to;
          n_tr++;
          checks++;
          if (trade_last != (n_tr == clen)) begin failures++; $display("FAIL trade_last"); end
        end
        @(negedge clk);
        cycles++;
      end
      checks++;
      if (!done) begin failures++; $display("FAIL no done"); end
      checks++;
      if (has_cycle) begin
        with_cycle++;
        if (!cycle_ok || n_tr != clen || int'(cycle_len) != clen || prev_to != first_from) begin
          failures++;
          $display("FAIL cycle len %0d got %0d/%0d ok=%b", clen, n_tr, cycle_len, cycle_ok);
        end
        // V predecessor steps, collecting clen, emitting clen
        checks++;
        if (cycles > V + 2 * clen + 3) begin failures++; $display("FAIL took %0d clocks", cycles); end
      end else begin
        without_cycle++;
        if (cycle_ok || n_tr != 0) begin failures++; $display("FAIL reported a cycle"); end
      end
    end
    checks++;
    if (with_cycle == 0 || without_cycle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
