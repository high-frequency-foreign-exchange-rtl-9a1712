// tb_forex_arb_full: the detector at its full size, 66 currencies (4356
// possible pairs, 1089 groups of four edges).
//
// Currencies 0..10 are USD, EUR, GBP, CHF, JPY, AUD, CAD, MXN, NZD, XAU and
// GRX; the rest are further currencies. Every currency has a value, and
// rates between currencies other than EUR and GBP are consistent with those
// values (weights are exact potential differences, so no loop among them
// pays). EUR and GBP are quoted only against USD and each other, with
//   EUR/USD 1.1837, EUR/GBP 0.7231, GBP/USD 1.6388,
// which leaves a profit of about 0.11% on the loop USD -> EUR -> GBP -> USD.
// Weights are -ln(rate) * 10^4 rounded to an integer; the profitable loop
// sums to 1686 + 3242 - 4940 = -12.
//   Run 1: the detector must report that loop as three trades, and each
//          sweep must take 1089 clocks.
//   Run 2: GBP/USD is corrected so that the loop no longer pays; no cycle
//          may be reported, the run must take 1 + 66 * (1089 + 3) clocks
//          and every vertex weight must equal a reference Bellman-Ford.
module tb_forex_arb_full;
  import fx_pkg::*;

  localparam int V  = 66;
  localparam int NG = V * V / P;
  localparam int USD = 0, EUR = 1, GBP = 2;

  logic clk = 0, rst = 1;
  logic chipselect = 0, write = 0, read = 0;
  logic [2:0] address = '0;
  logic [15:0] writedata = '0, readdata;
  logic waitrequest, busy, done, found;
  logic trade_valid, trade_last;
  idx_t trade_from, trade_to;

  forex_arb_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  edge_w_t wt [V][V];
  int n_edges = 0;

  task automatic bus_write(input logic [2:0] a, input logic [15:0] d);
    @(negedge clk);
    chipselect = 1; write = 1; address = a; writedata = d;
    #1;
    while (waitrequest) begin @(negedge clk); #1; end
    @(negedge clk);
    chipselect = 0; write = 0;
  endtask

  task automatic bus_read(input logic [2:0] a, output logic [15:0] d);
    @(negedge clk);
    chipselect = 1; read = 1; address = a;
    #1;
    d = readdata;
    @(negedge clk);
    chipselect = 0; read = 0;
  endtask

  task automatic put_edge(input int i, input int j, input int w);
    wt[i][j] = edge_w_t'(w);
    bus_write(3'd0, 16'(i));
    bus_write(3'd1, 16'(j));
    bus_write(3'd2, 16'(w));
  endtask

  function automatic int wlog(input real rate);
    return int'($floor(-$ln(rate) * 10000.0 + 0.5));
  endfunction

  // trade log
  int tr_from [$], tr_to [$];
  always @(posedge clk) if (trade_valid && !rst) begin tr_from.push_back(int'(trade_from)); tr_to.push_back(int'(trade_to)); end

  // sweep length: clocks of consecutive group issues
  int issue_run, sweeps_ok, sweeps_seen;
  always @(posedge clk) begin
    if (dut.u_ctrl.issue) issue_run++;
    else if (issue_run != 0) begin
      sweeps_seen++;
      if (issue_run == NG) sweeps_ok++;
      issue_run = 0;
    end
  end

  int busy_clocks;
  always @(posedge clk) if (busy) busy_clocks++;

  // returns the number of clocks busy was high
  task automatic run(output int clocks);
    int guard;
    guard = 0;
    bus_write(3'd3, 16'd20);        // Bellman-Ford source: currency 20
    busy_clocks = 0;
    bus_write(3'd4, 16'd1);
    @(negedge clk);
    while (!done && guard < 200000) begin @(negedge clk); guard++; end
    clocks = busy_clocks;
  endtask

  initial begin
    int pot [V];
    int clocks, sum;
    logic [15:0] r;
    longint d [V];
    issue_run = 0; sweeps_ok = 0; sweeps_seen = 0;
    for (int i = 0; i < V; i++) for (int j = 0; j < V; j++) wt[i][j] = NO_EDGE;
    for (int x = 0; x < V; x++) pot[x] = $urandom_range(0, 12000) - 6000;
    repeat (3) @(posedge clk);
    rst <= 0;
    // consistent market among all currencies but EUR and GBP
    for (int i = 0; i < V; i++)
      for (int j = 0; j < V; j++)
        if (i != j && i != EUR && i != GBP && j != EUR && j != GBP &&
            (i == USD || j == USD || $urandom_range(0, 9) == 0)) begin
          put_edge(i, j, pot[j] - pot[i]);
          n_edges++;
        end
    // the example triangle, both directions
    put_edge(EUR, USD, wlog(1.1837));        put_edge(USD, EUR, -wlog(1.1837));
    put_edge(EUR, GBP, wlog(0.7231));        put_edge(GBP, EUR, -wlog(0.7231));
    put_edge(GBP, USD, wlog(1.6388));        put_edge(USD, GBP, -wlog(1.6388));
    n_edges += 6;
    $display("loaded %0d edges", n_edges);
    checks++;
    if (wt[USD][EUR] + wt[EUR][GBP] + wt[GBP][USD] != -12) begin
      failures++; $display("FAIL loop weight %0d", wt[USD][EUR] + wt[EUR][GBP] + wt[GBP][USD]);
    end

    // ---- run 1: arbitrage present
    run(clocks);
    $display("run 1: %0d clocks", clocks);
    bus_read(3'd0, r);
    checks++;
    if (r[3:0] != 4'b1110) begin failures++; $display("FAIL status %b", r[3:0]); end
    checks++;
    if (tr_from.size() != 3) begin failures++; $display("FAIL %0d trades", tr_from.size()); end
    else begin
      sum = 0;
      for (int k = 0; k < 3; k++) begin
        sum += int'(wt[tr_from[k]][tr_to[k]]);
        checks++;
        if (tr_to[k] != tr_from[(k + 1) % 3]) begin failures++; $display("FAIL trades do not chain"); end
        $display("trade %0d: %0d -> %0d", k, tr_from[k], tr_to[k]);
      end
      checks++;
      if (sum != -12) begin failures++; $display("FAIL loop sum %0d", sum); end
    end
    bus_read(3'd2, r);
    checks++;
    if (r != 16'd3) begin failures++; $display("FAIL cycle length %0d", r); end
    checks++;
    if (sweeps_seen != V || sweeps_ok != V) begin
      failures++; $display("FAIL sweeps %0d of %0d with %0d clocks", sweeps_ok, sweeps_seen, NG);
    end

    // ---- run 2: loop closed at no profit
    put_edge(GBP, USD, -(wt[USD][EUR] + wt[EUR][GBP]));
    put_edge(USD, GBP, wt[USD][EUR] + wt[EUR][GBP]);
    tr_from.delete(); tr_to.delete();
    run(clocks);
    $display("run 2: %0d clocks", clocks);
    checks++;
    if (found || tr_from.size() != 0) begin failures++; $display("FAIL cycle reported"); end
    checks++;
    if (clocks != 1 + V * (NG + 3)) begin failures++; $display("FAIL run length %0d", clocks); end
    for (int x = 0; x < V; x++) d[x] = (x == 20) ? 0 : 64'h7fff_ffff_ffff;
    for (int it = 0; it < V - 1; it++)
      for (int i = 0; i < V; i++)
        for (int j = 0; j < V; j++)
          if (wt[i][j] != NO_EDGE && d[i] != 64'h7fff_ffff_ffff && d[i] + wt[i][j] < d[j])
            d[j] = d[i] + wt[i][j];
    for (int x = 0; x < V; x++) begin
      checks++;
      if (longint'(dut.u_vt.w_q[x]) != d[x]) begin
        failures++; $display("FAIL w(%0d) = %0d, reference %0d", x, dut.u_vt.w_q[x], d[x]);
      end
    end
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
