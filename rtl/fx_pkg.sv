// fx_pkg: types and constants shared by the Bellman-Ford arbitrage detector.
//
// An exchange rate r between two currencies becomes the edge weight
// round(-log(r) * 10^k), a signed 16-bit integer computed by the host. A
// cycle of trades is profitable exactly when its edge weights sum below
// zero, so the hardware looks for negative-weight cycles.
//
// The edge sweep handles P = 4 edges per clock. Each edge travels through
// the sort / filter / relax stages as an edge_cand_t word whose top bit is
// the update signal (1 = still a candidate for relaxation), followed by the
// destination j, the source i and the update value w(i) + w(i,j).
//
// The 16-bit edge width and 7-bit vertex index are the design's sizes for
// 66 currencies; the 40-bit vertex weight and the two sentinels below are
// this design's own choices (a path weight must hold sums of many edges).
package fx_pkg;

  localparam int P      = 4;   // edges handled per clock
  localparam int EDGE_W = 16;  // streamed edge weight, signed
  localparam int IDX_W  = 7;   // vertex index, up to 128 vertices
  localparam int DIST_W = 40;  // vertex (path) weight, signed

  typedef logic signed [EDGE_W-1:0] edge_w_t;
  typedef logic signed [DIST_W-1:0] dist_t;
  typedef logic        [IDX_W-1:0]  idx_t;

  // Edge weight code meaning "no such currency pair".
  localparam edge_w_t NO_EDGE = {1'b1, {(EDGE_W-1){1'b0}}};
  // INFINITY of the initialisation: largest positive path weight.
  localparam dist_t   DIST_INF = {1'b0, {(DIST_W-1){1'b1}}};
  // NULL predecessor.
  localparam idx_t    IDX_NULL = '1;

  // One edge on its way to relaxation.
  typedef struct packed {
    logic  upd;   // update signal: still a valid relaxation candidate
    idx_t  dst;   // j
    idx_t  src;   // i
    dist_t wu;    // update value w(i) + w(i,j)
  } edge_cand_t;

endpackage
