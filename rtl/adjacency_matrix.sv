// adjacency_matrix: edge weights w(i,j) of the currency graph.
//
// The V*V ordered pairs are numbered e = j*V + i, so all edges into one
// destination are consecutive. Group g holds edges P*g .. P*g+P-1; edge e
// lives in lane e % P at word e / P of its lane array. One read port
// returns a whole group (P weights) one clock after rd_group is given, which
// is how the edge sweep loads P edges per clock. One write port stores a
// single edge from the update module; clr_en overwrites every lane of
// clr_group with NO_EDGE. A write and a read of the same word in one clock
// return the old weight. With V = 66 there are 1089 groups.
// The matrix organisation and V = 66 follow the design description; the
// edge numbering, lane split and clear port are this design's own.
module adjacency_matrix
  import fx_pkg::*;
#(
  parameter int V    = 66,
  parameter int NG   = (V*V + P - 1) / P,          // number of edge groups
  parameter int GA_W = (NG > 1) ? $clog2(NG) : 1   // group address width
)(
  input  logic            clk,
  // single-edge write (update module)
  input  logic            wr_en,
  input  idx_t            wr_src,
  input  idx_t            wr_dst,
  input  edge_w_t         wr_weight,
  // clear one whole group to NO_EDGE
  input  logic            clr_en,
  input  logic [GA_W-1:0] clr_group,
  // group read (edge sweep)
  input  logic [GA_W-1:0] rd_group,
  output edge_w_t         rd_weight [P]
);

  localparam int LANE_W = $clog2(P);

  int unsigned                 e_lin;
  logic [GA_W-1:0]             wr_group;
  logic [LANE_W-1:0]           wr_lane;

  always_comb begin
    e_lin    = int'(wr_dst) * V + int'(wr_src);
    wr_group = GA_W'(e_lin / P);
    wr_lane  = LANE_W'(e_lin % P);
  end

  for (genvar k = 0; k < P; k++) begin : g_lane
    edge_w_t mem [NG];

    always_ff @(posedge clk) begin
      if (clr_en)
        mem[clr_group] <= NO_EDGE;
      else if (wr_en && wr_lane == LANE_W'(k))
        mem[wr_group] <= wr_weight;
      rd_weight[k] <= mem[rd_group];
    end
  end

endmodule
