// tb_adjacency_matrix: small matrix (V = 7, 49 edges, 13 groups, last one
// padded). Clears every group, writes random edges while keeping a model,
// and reads every group back one clock after its address.
module tb_adjacency_matrix;
  import fx_pkg::*;

  localparam int V = 7;
  localparam int NG = (V*V + P - 1) / P;
  localparam int GA_W = $clog2(NG);

  logic clk = 0;
  logic wr_en = 0, clr_en = 0;
  idx_t wr_src = '0, wr_dst = '0;
  edge_w_t wr_weight = '0;
  logic [GA_W-1:0] clr_group = '0, rd_group = '0;
  edge_w_t rd_weight [P];
  edge_w_t model [NG*P];
  int checks = 0, failures = 0;

  adjacency_matrix #(.V(V)) dut (.*);

  always #5 clk = ~clk;

  task automatic read_all();
    for (int g = 0; g < NG; g++) begin
      rd_group <= GA_W'(g);
      @(posedge clk);
      #1;
      for (int k = 0; k < P; k++) begin
        checks++;
        if (rd_weight[k] !== model[g*P + k]) begin
          failures++;
          $display("FAIL group %0d lane %0d got %0d exp %0d", g, k, rd_weight[k], model[g*P+k]);
        end
      end
    end
  endtask

  initial begin
    for (int g = 0; g < NG; g++) begin
      clr_en <= 1; clr_group <= GA_W'(g);
      @(posedge clk);
    end
    clr_en <= 0;
    for (int e = 0; e < NG*P; e++) model[e] = NO_EDGE;
    read_all();
    for (int n = 0; n < 60; n++) begin
      int i, j;
      i = $urandom_range(0, V-1); j = $urandom_range(0, V-1);
      wr_en <= 1; wr_src <= idx_t'(i); wr_dst <= idx_t'(j);
      wr_weight <= edge_w_t'($urandom);
      @(posedge clk);
      model[j*V + i] = wr_weight;
    end
    wr_en <= 0;
    read_all();
    // one clear among the written edges
    clr_en <= 1; clr_group <= GA_W'(3);
    @(posedge clk);
    clr_en <= 0;
    for (int k = 0; k < P; k++) model[3*P + k] = NO_EDGE;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
