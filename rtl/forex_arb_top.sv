// forex_arb_top: FPGA side of a triangular-arbitrage detector for currency
// exchange rates.
//
// The host writes edge weights w(i,j) = -log(rate) (scaled to 16-bit
// integers) through the update slave into the adjacency matrix and starts a
// run. A run is Bellman-Ford from a chosen source currency: the controller
// sweeps all V*V edges V-1 times, P = 4 edges per clock, through a
// three-stage pipeline:
//   stage 0  group address to the adjacency matrix (synchronous read);
//   stage 1  the P weights arrive, each edge's source weight w(i) is read
//            from the vertex table and the update value w(i) + w(i,j) is
//            formed; the update bit is set when the edge exists and w(i)
//            is finite; the P candidate words are registered;
//   stage 2  sorting network (one candidate per destination survives),
//            filter (Valid per word), relaxation lanes against the current
//            w(j); the vertex table is written at the end of the clock.
// A last sweep feeds the same stage-2 words to the cycle detector instead of
// the relaxation lanes. If an edge can still be relaxed, the decision maker
// follows predecessors around the negative cycle and streams the trades out
// on trade_*. With V = 66 a sweep is 1089 clocks and a full run about 72,000
// clocks. The block structure follows the design description; the pipeline
// cut, the bus register map and the trade stream are this design's own.
module forex_arb_top
  import fx_pkg::*;
#(
  parameter int V = 66
)(
  input  logic        clk,
  input  logic        rst,
  // memory-mapped slave from the host CPU
  input  logic        chipselect,
  input  logic        write,
  input  logic        read,
  input  logic [2:0]  address,
  input  logic [15:0] writedata,
  output logic [15:0] readdata,
  output logic        waitrequest,
  // status
  output logic        busy,
  output logic        done,
  output logic        found,
  // trades that exploit the detected cycle
  output logic        trade_valid,
  output idx_t        trade_from,
  output idx_t        trade_to,
  output logic        trade_last
);

  localparam int NG   = (V*V + P - 1) / P;
  localparam int GA_W = (NG > 1) ? $clog2(NG) : 1;

  // ---------------------------------------------------------------- update
  logic            am_wr_en, am_clr_en;
  idx_t            am_wr_src, am_wr_dst;
  edge_w_t         am_wr_weight;
  logic [GA_W-1:0] am_clr_group;
  idx_t            bf_source;
  logic            bf_start;
  idx_t            found_src, found_dst;
  dist_t           found_w;
  idx_t            cycle_len;
  logic            cycle_ok;

  update #(.V(V)) u_update (
    .clk, .rst,
    .chipselect, .write, .read, .address, .writedata, .readdata, .waitrequest,
    .am_wr_en, .am_wr_src, .am_wr_dst, .am_wr_weight, .am_clr_en, .am_clr_group,
    .bf_source, .bf_start, .bf_busy(busy), .bf_done(done), .bf_found(found), .bf_cycle_ok(cycle_ok),
    .found_src, .found_dst, .cycle_len
  );

  // ------------------------------------------------------------ controller
  logic            vt_init, issue, detect, det_clear, dm_start, dm_done;
  logic [GA_W-1:0] rd_group;
  idx_t            src0, dst0;
  logic [15:0]     sweep_cnt;

  bf_controller #(.V(V)) u_ctrl (
    .clk, .rst, .start(bf_start),
    .vt_init, .issue, .detect, .det_clear, .rd_group, .src0, .dst0,
    .found, .dm_start, .dm_done, .busy, .done, .sweep_cnt
  );

  // ------------------------------------------------------ adjacency matrix
  edge_w_t rd_weight [P];

  adjacency_matrix #(.V(V)) u_adj (
    .clk,
    .wr_en(am_wr_en), .wr_src(am_wr_src), .wr_dst(am_wr_dst), .wr_weight(am_wr_weight),
    .clr_en(am_clr_en), .clr_group(am_clr_group),
    .rd_group, .rd_weight
  );

  // ------------------------------------------------------ stage 1: operands
  logic s1_valid, s1_detect;
  idx_t s1_src0, s1_dst0;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid  <= 1'b0;
      s1_detect <= 1'b0;
      s1_src0   <= '0;
      s1_dst0   <= '0;
    end else begin
      s1_valid  <= issue;
      s1_detect <= detect;
      s1_src0   <= src0;
      s1_dst0   <= dst0;
    end
  end

  idx_t       l_src [P];
  idx_t       l_dst [P];
  dist_t      w_src [P];
  edge_cand_t s1_cand [P];

  always_comb begin
    for (int k = 0; k < P; k++) begin
      if (int'(s1_src0) + k >= V) begin
        l_src[k] = idx_t'(int'(s1_src0) + k - V);
        l_dst[k] = s1_dst0 + 1'b1;
      end else begin
        l_src[k] = idx_t'(int'(s1_src0) + k);
        l_dst[k] = s1_dst0;
      end
    end
  end

  // vertex table
  idx_t         rd_dst_idx [P];
  dist_t        w_dst      [P];
  logic [P-1:0] vt_wr_en;
  idx_t         vt_wr_idx  [P];
  dist_t        vt_wr_w    [P];
  idx_t         vt_wr_pred [P];
  idx_t         pr_idx, pr_pred;
  dist_t        pr_w;

  vertex_table #(.V(V)) u_vt (
    .clk, .init(vt_init), .src(bf_source),
    .rd_src_idx(l_src), .rd_src_w(w_src),
    .rd_dst_idx, .rd_dst_w(w_dst),
    .wr_en(vt_wr_en), .wr_idx(vt_wr_idx), .wr_w(vt_wr_w), .wr_pred(vt_wr_pred),
    .pr_idx, .pr_pred, .pr_w
  );

  always_comb begin
    for (int k = 0; k < P; k++) begin
      s1_cand[k].upd = s1_valid && (int'(l_dst[k]) < V) &&
                       (rd_weight[k] != NO_EDGE) && (w_src[k] != DIST_INF);
      s1_cand[k].dst = l_dst[k];
      s1_cand[k].src = l_src[k];
      s1_cand[k].wu  = w_src[k] + dist_t'(rd_weight[k]);
    end
  end

  edge_cand_t s2_cand [P];
  logic       s2_valid, s2_detect;

  always_ff @(posedge clk) begin
    if (rst) begin
      s2_valid  <= 1'b0;
      s2_detect <= 1'b0;
      for (int k = 0; k < P; k++) s2_cand[k] <= '0;
    end else begin
      s2_valid  <= s1_valid;
      s2_detect <= s1_detect;
      s2_cand   <= s1_cand;
    end
  end

  // ------------------------------------ stage 2: sort, filter, relax/detect
  edge_cand_t                sorted   [P];
  edge_cand_t                filtered [P];
  logic [P-1:0]              f_valid;
  logic [$clog2(P+1)-1:0]    n_valid, n_updates;
  logic                      dup_seen;

  sorting_network u_sort (.in_words(s2_cand), .out_words(sorted));

  filter u_filter (
    .in_words(sorted), .out_words(filtered), .valid(f_valid),
    .n_valid, .dup_seen
  );

  always_comb for (int k = 0; k < P; k++) rd_dst_idx[k] = filtered[k].dst;

  logic [P-1:0] rx_en;
  idx_t         rx_idx  [P];
  dist_t        rx_w    [P];
  idx_t         rx_pred [P];

  relaxation u_relax (
    .cand(filtered), .valid(f_valid & {P{s2_valid && !s2_detect}}), .w_dst,
    .wr_en(rx_en), .wr_idx(rx_idx), .wr_w(rx_w), .wr_pred(rx_pred), .n_updates
  );

  logic  fix_en;
  idx_t  fix_idx, fix_pred;
  dist_t fix_w;

  cycle_detector u_det (
    .clk, .rst, .clear(det_clear), .check(s2_valid && s2_detect),
    .cand(filtered), .valid(f_valid), .w_dst,
    .fix_en, .fix_idx, .fix_w, .fix_pred,
    .found, .found_src, .found_dst, .found_w
  );

  always_comb begin
    vt_wr_en   = rx_en;
    vt_wr_idx  = rx_idx;
    vt_wr_w    = rx_w;
    vt_wr_pred = rx_pred;
    if (fix_en) begin
      vt_wr_en[0]   = 1'b1;
      vt_wr_idx[0]  = fix_idx;
      vt_wr_w[0]    = fix_w;
      vt_wr_pred[0] = fix_pred;
    end
  end

  // -------------------------------------------------------- decision maker

  decision_maker #(.V(V)) u_dm (
    .clk, .rst, .start(dm_start), .start_vertex(found_dst),
    .pr_idx, .pr_pred,
    .trade_valid, .trade_from, .trade_to, .trade_last,
    .done(dm_done), .cycle_ok, .cycle_len
  );

endmodule
