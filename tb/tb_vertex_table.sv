// tb_vertex_table: V = 9. Checks the Bellman-Ford initial values for two
// source vertices, then random four-lane writes to distinct vertices
// against a model, through all read ports.
module tb_vertex_table;
  import fx_pkg::*;

  localparam int V = 9;

  logic clk = 0;
  logic init = 0;
  idx_t src = '0;
  idx_t rd_src_idx [P], rd_dst_idx [P];
  dist_t rd_src_w [P], rd_dst_w [P];
  logic [P-1:0] wr_en = '0;
  idx_t wr_idx [P], wr_pred [P];
  dist_t wr_w [P];
  idx_t pr_idx = '0, pr_pred;
  dist_t pr_w;
  dist_t mw [V];
  idx_t  mp [V];
  int checks = 0, failures = 0;

  vertex_table #(.V(V)) dut (.*);

  always #5 clk = ~clk;

  task automatic compare_all();
    for (int x = 0; x < V; x++) begin
      for (int k = 0; k < P; k++) begin
        rd_src_idx[k] = idx_t'(x);
        rd_dst_idx[k] = idx_t'((x + k) % V);
      end
      pr_idx = idx_t'(x);
      #1;
      for (int k = 0; k < P; k++) begin
        checks += 2;
        if (rd_src_w[k] !== mw[x]) begin failures++; $display("FAIL w(%0d)", x); end
        if (rd_dst_w[k] !== mw[(x + k) % V]) begin failures++; $display("FAIL wj(%0d)", (x+k)%V); end
      end
      checks++;
      if (pr_pred !== mp[x] || pr_w !== mw[x]) begin failures++; $display("FAIL p(%0d)", x); end
    end
  endtask

  initial begin
    for (int k = 0; k < P; k++) begin
      wr_idx[k] = '0; wr_pred[k] = '0; wr_w[k] = '0; rd_src_idx[k] = '0; rd_dst_idx[k] = '0;
    end
    for (int s = 2; s <= 5; s += 3) begin
      init <= 1; src <= idx_t'(s);
      @(posedge clk);
      init <= 0;
      #1;
      for (int x = 0; x < V; x++) begin
        mw[x] = (x == s) ? dist_t'(0) : DIST_INF;
        mp[x] = IDX_NULL;
      end
      compare_all();
      for (int n = 0; n < 40; n++) begin
        int perm [V];
        for (int x = 0; x < V; x++) perm[x] = x;
        perm.shuffle();
        @(negedge clk);
        for (int k = 0; k < P; k++) begin
          wr_en[k]   = 1'($urandom);
          wr_idx[k]  = idx_t'(perm[k]);
          wr_w[k]    = dist_t'($signed($urandom_range(0, 500)) - 250);
          wr_pred[k] = idx_t'($urandom_range(0, V-1));
        end
        @(posedge clk);
        #1;
        for (int k = 0; k < P; k++)
          if (wr_en[k]) begin mw[wr_idx[k]] = wr_w[k]; mp[wr_idx[k]] = wr_pred[k]; end
        wr_en = '0;
        compare_all();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
