// tb_update: V = 6 (9 groups). Checks the clearing walk after reset with
// waitrequest holding a write off, edge writes through registers 0..2, the
// source register, the start pulse, the stall while the engine is busy and
// the three status reads.
module tb_update;
  import fx_pkg::*;

  localparam int V = 6;
  localparam int NG = (V*V + P - 1) / P;
  localparam int GA_W = $clog2(NG);

  logic clk = 0, rst = 1;
  logic chipselect = 0, write = 0, read = 0;
  logic [2:0] address = '0;
  logic [15:0] writedata = '0, readdata;
  logic waitrequest;
  logic am_wr_en, am_clr_en, bf_start;
  idx_t am_wr_src, am_wr_dst, bf_source;
  edge_w_t am_wr_weight;
  logic [GA_W-1:0] am_clr_group;
  logic bf_busy = 0, bf_done = 0, bf_found = 0, bf_cycle_ok = 0;
  idx_t found_src = '0, found_dst = '0, cycle_len = '0;
  int checks = 0, failures = 0;
  int clr_seen [NG];
  int edge_writes = 0, starts = 0, stall_clocks = 0;
  idx_t last_src, last_dst;
  edge_w_t last_w;

  update #(.V(V)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (am_clr_en) clr_seen[am_clr_group]++;
    if (am_wr_en) begin edge_writes++; last_src = am_wr_src; last_dst = am_wr_dst; last_w = am_wr_weight; end
    if (bf_start) starts++;
    if (waitrequest) stall_clocks++;
  end

  // host-side write: hold the request until waitrequest is low
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

  initial begin
    logic [15:0] r;
    int clocks;
    for (int g = 0; g < NG; g++) clr_seen[g] = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    // a write straight after reset waits for the clear walk
    clocks = 0;
    fork
      bus_write(3'd0, 16'd4);
      begin repeat (2 * NG) @(posedge clk); end
    join_any
    for (int g = 0; g < NG; g++) begin
      checks++;
      if (clr_seen[g] < 1) begin failures++; $display("FAIL group %0d cleared %0d times", g, clr_seen[g]); end
    end
    checks++;
    if (stall_clocks < NG - 1) begin failures++; $display("FAIL stall only %0d clocks", stall_clocks); end
    // edge writes
    for (int n = 0; n < 20; n++) begin
      int i, j;
      logic [15:0] w;
      i = $urandom_range(0, V-1); j = $urandom_range(0, V-1); w = 16'($urandom);
      bus_write(3'd0, 16'(i));
      bus_write(3'd1, 16'(j));
      bus_write(3'd2, w);
      checks++;
      if (edge_writes != n + 1 || int'(last_src) != i || int'(last_dst) != j || last_w != w) begin
        failures++;
        $display("FAIL edge write %0d: %0d %0d %h", n, last_src, last_dst, last_w);
      end
    end
    bus_write(3'd3, 16'd2);
    checks++;
    if (bf_source != 2) failures++;
    bus_write(3'd4, 16'd0);
    checks++;
    if (starts != 0) failures++;
    bus_write(3'd4, 16'd1);
    checks++;
    if (starts != 1) failures++;
    // engine busy: a write is held off until busy falls
    bf_busy = 1;
    fork
      bus_write(3'd2, 16'h1234);
      begin repeat (10) @(negedge clk); checks++; if (edge_writes != 20) failures++; bf_busy = 0; end
    join
    checks++;
    if (edge_writes != 21 || last_w != 16'h1234) begin failures++; $display("FAIL held write lost %0d %h", edge_writes, last_w); end
    // status reads
    bf_done = 1; bf_found = 1; bf_cycle_ok = 1; found_src = idx_t'(3); found_dst = idx_t'(5); cycle_len = idx_t'(3);
    bus_read(3'd0, r);
    checks++; if (r != 16'b1110) begin failures++; $display("FAIL status %h", r); end
    bus_read(3'd1, r);
    checks++; if (r != {1'b0, 7'd3, 1'b0, 7'd5}) begin failures++; $display("FAIL edge read %h", r); end
    bus_read(3'd2, r);
    checks++; if (r != 16'd3) begin failures++; $display("FAIL len read %h", r); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
