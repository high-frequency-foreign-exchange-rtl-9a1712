// tb_forex_arb_top: end-to-end runs of the arbitrage detector at V = 8.
//
// Each test loads a graph over the bus and starts a run. Graphs are either
// free of arbitrage (edge weight = potential difference plus a non-negative
// spread), carry a planted profitable loop, or have random weights. A
// Bellman-Ford model in the testbench decides whether a negative cycle is
// reachable from the source. The run must agree; without a cycle the vertex
// weights must equal the model's shortest paths and the run must take
// exactly 1 + V*(NG+3) busy clocks; with one, the trade stream must form a
// closed loop of existing edges whose weights add up below zero. It also
// counts how often each mechanism fired: the clear walk, bus stalls, the
// sorting network dropping a duplicate destination, partly used groups in
// the filter, relaxation writes, rejected candidates, detections, clean
// runs and emitted trades; one that never fired counts as a failure.
module tb_forex_arb_top;
  import fx_pkg::*;

  localparam int V  = 8;
  localparam int NG = (V*V + P - 1) / P;

  logic clk = 0, rst = 1;
  logic chipselect = 0, write = 0, read = 0;
  logic [2:0] address = '0;
  logic [15:0] writedata = '0, readdata;
  logic waitrequest, busy, done, found;
  logic trade_valid, trade_last;
  idx_t trade_from, trade_to;

  forex_arb_top #(.V(V)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_clear = 0, n_stall_busy = 0, n_sort_drop = 0, n_partial = 0;
  int n_relax = 0, n_reject = 0, n_found = 0, n_clean = 0, n_trades = 0;

  // mechanism counters, sampled inside the pipeline
  always @(posedge clk) begin
    int up_in, up_out;
    if (dut.u_update.am_clr_en && !rst) n_clear++;
    if (waitrequest && busy) n_stall_busy++;
    up_in = 0; up_out = 0;
    for (int k = 0; k < P; k++) begin
      up_in  += int'(dut.s2_cand[k].upd);
      up_out += int'(dut.sorted[k].upd);
    end
    if (dut.s2_valid && up_out < up_in) n_sort_drop++;
    if (dut.s2_valid && dut.n_valid > 0 && int'(dut.n_valid) < P) n_partial++;
    if (dut.s2_valid && !dut.s2_detect) begin
      n_relax  += int'(dut.n_updates);
      n_reject += int'(dut.n_valid) - int'(dut.n_updates);
    end
    if (dut.dup_seen && !rst) begin
      failures++;
      $display("FAIL filter saw a duplicate destination after sorting");
    end
    if (trade_valid && !rst) n_trades++;
  end

  edge_w_t wt [V][V];   // wt[i][j] = w(i,j)

  task automatic bus_write(input logic [2:0] a, input logic [15:0] d);
    @(negedge clk);
    chipselect = 1; write = 1; address = a; writedata = d;
    #1;
    while (waitrequest) begin @(negedge clk); #1; end
    @(negedge clk);
    chipselect = 0; write = 0;
  endtask

  task automatic load_graph();
    for (int i = 0; i < V; i++)
      for (int j = 0; j < V; j++) begin
        bus_write(3'd0, 16'(i));
        bus_write(3'd1, 16'(j));
        bus_write(3'd2, 16'(wt[i][j]));
      end
  endtask

  // Bellman-Ford model: shortest distances and whether a negative cycle is
  // reachable from src
  task automatic model(input int src, output longint d [V], output bit neg);
    for (int x = 0; x < V; x++) d[x] = (x == src) ? 0 : 64'h7fff_ffff_ffff;
    for (int it = 0; it < V - 1; it++)
      for (int i = 0; i < V; i++)
        for (int j = 0; j < V; j++)
          if (wt[i][j] != NO_EDGE && d[i] != 64'h7fff_ffff_ffff && d[i] + wt[i][j] < d[j])
            d[j] = d[i] + wt[i][j];
    neg = 0;
    for (int i = 0; i < V; i++)
      for (int j = 0; j < V; j++)
        if (wt[i][j] != NO_EDGE && d[i] != 64'h7fff_ffff_ffff && d[i] + wt[i][j] < d[j]) neg = 1;
  endtask

  task automatic make_graph(input int kind);
    int pot [V];
    for (int x = 0; x < V; x++) pot[x] = $urandom_range(0, 4000);
    for (int i = 0; i < V; i++)
      for (int j = 0; j < V; j++) begin
        if (i == j || $urandom_range(0, 2) == 0) wt[i][j] = NO_EDGE;
        else if (kind == 2) wt[i][j] = edge_w_t'($signed($urandom_range(0, 300)) - 40);
        else wt[i][j] = edge_w_t'(pot[j] - pot[i] + $urandom_range(0, 30));
      end
    if (kind == 1) begin
      // plant a profitable loop a -> b -> c -> a
      int a, b, c;
      a = $urandom_range(0, V-1);
      b = (a + 1 + $urandom_range(0, V-3)) % V;
      c = b;
      while (c == a || c == b) c = $urandom_range(0, V-1);
      wt[a][b] = edge_w_t'(pot[b] - pot[a]);
      wt[b][c] = edge_w_t'(pot[c] - pot[b]);
      wt[c][a] = edge_w_t'(pot[a] - pot[c] - $urandom_range(1, 20));
    end
  endtask

  task automatic one_test(input int kind, input int src);
    longint d [V];
    bit neg;
    int guard;
    make_graph(kind);
    model(src, d, neg);
    load_graph();
    bus_write(3'd3, 16'(src));
    bus_write(3'd4, 16'd1);
    // a write during the run is held off by waitrequest
    bus_write(3'd0, 16'd0);
    guard = 0;
    while (!done && guard < 200000) begin
      @(negedge clk);
      guard++;
    end
    checks++;
    if (found !== neg) begin
      failures++;
      $display("FAIL kind %0d src %0d: found=%b model=%b", kind, src, found, neg);
    end
    if (neg) n_found++; else n_clean++;
    if (!neg) begin
      for (int x = 0; x < V; x++) begin
        checks++;
        if (d[x] == 64'h7fff_ffff_ffff ? (dut.u_vt.w_q[x] != DIST_INF)
                                       : (longint'(dut.u_vt.w_q[x]) != d[x])) begin
          failures++;
          $display("FAIL w(%0d) = %0d, model %0d", x, dut.u_vt.w_q[x], d[x]);
        end
      end
    end
  endtask

  // trade checker: runs alongside, resets on each start
  int tr_sum, tr_n, tr_loops, tr_bad;
  idx_t tr_first, tr_prev;
  always @(posedge clk) begin
    if (dut.bf_start) begin tr_sum = 0; tr_n = 0; end
    if (trade_valid && !rst) begin
      if (wt[trade_from][trade_to] == NO_EDGE) tr_bad++;
      if (tr_n == 0) tr_first = trade_from;
      else if (trade_from != tr_prev) tr_bad++;
      tr_prev = trade_to;
      tr_sum += int'(wt[trade_from][trade_to]);
      tr_n++;
      if (trade_last) begin
        if (trade_to != tr_first || tr_sum >= 0) tr_bad++;
        tr_loops++;
      end
    end
  end

  // busy-time check of clean runs: busy from the clock after the start
  // write to the clock done rises
  int run_clocks, run_exact, run_checked;
  logic done_q;
  always @(posedge clk) begin
    done_q <= done;
    if (dut.bf_start) run_clocks = 0;
    else if (busy) run_clocks++;
    if (done && !done_q && !found) begin
      run_checked++;
      if (run_clocks == 1 + V * (NG + 3)) run_exact++;
      else $display("run took %0d busy clocks", run_clocks);
    end
  end

  initial begin
    tr_loops = 0; tr_bad = 0; run_exact = 0; run_checked = 0; run_clocks = 0;
    for (int i = 0; i < V; i++) for (int j = 0; j < V; j++) wt[i][j] = NO_EDGE;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 24; t++) one_test(t % 3, $urandom_range(0, V-1));
    checks++;
    if (tr_bad != 0) begin failures++; $display("FAIL %0d bad trades", tr_bad); end
    checks++;
    if (tr_loops != n_found) begin
      failures++; $display("FAIL %0d trade loops for %0d detections", tr_loops, n_found);
    end
    checks++;
    if (run_exact != run_checked) begin
      failures++; $display("FAIL run length: %0d of %0d exact", run_exact, run_checked);
    end
    $display("mechanisms: clear=%0d stall_busy=%0d sort_drop=%0d partial=%0d relax=%0d reject=%0d found=%0d clean=%0d trades=%0d runs_timed=%0d",
             n_clear, n_stall_busy, n_sort_drop, n_partial, n_relax, n_reject, n_found, n_clean, n_trades, run_checked);
    checks += 10;
    if (n_clear == 0) failures++;
    if (n_stall_busy == 0) failures++;
    if (n_sort_drop == 0) failures++;
    if (n_partial == 0) failures++;
    if (n_relax == 0) failures++;
    if (n_reject == 0) failures++;
    if (n_found == 0) failures++;
    if (n_clean == 0) failures++;
    if (n_trades == 0) failures++;
    if (run_checked == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
