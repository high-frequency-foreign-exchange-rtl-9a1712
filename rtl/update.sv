// update: memory-mapped slave through which the host CPU loads the graph.
//
// The host streams 16-bit integers (edge weights -log(rate) scaled to
// integers) over the CPU-to-FPGA bus. Word-addressed register map:
//   write 0  source currency i of the next edge
//   write 1  destination currency j of the next edge
//   write 2  weight w(i,j); the write stores the edge in the adjacency
//            matrix (NO_EDGE = 16'h8000 removes it)
//   write 3  Bellman-Ford source vertex
//   write 4  control: bit 0 = 1 starts a run
//   read  0  status {12'b0, cycle_ok, found, done, busy}
//   read  1  detected edge {1'b0, i, 1'b0, j}
//   read  2  number of trades in the detected cycle
// After reset the module walks all NG groups of the matrix and clears them
// to NO_EDGE, one group per clock. While it clears, and while a run is
// busy, waitrequest is high and writes are held off (the host keeps its
// request asserted until waitrequest falls); reads are always answered in
// the same clock. Streaming the data over the bus into an update block
// follows the design description; the register map, the stall and the
// clearing after reset are this design's own.
module update
  import fx_pkg::*;
#(
  parameter int V    = 66,
  parameter int NG   = (V*V + P - 1) / P,
  parameter int GA_W = (NG > 1) ? $clog2(NG) : 1
)(
  input  logic            clk,
  input  logic            rst,
  // bus slave
  input  logic            chipselect,
  input  logic            write,
  input  logic            read,
  input  logic [2:0]      address,
  input  logic [15:0]     writedata,
  output logic [15:0]     readdata,
  output logic            waitrequest,
  // adjacency matrix write and clear
  output logic            am_wr_en,
  output idx_t            am_wr_src,
  output idx_t            am_wr_dst,
  output edge_w_t         am_wr_weight,
  output logic            am_clr_en,
  output logic [GA_W-1:0] am_clr_group,
  // engine control and status
  output idx_t            bf_source,
  output logic            bf_start,
  input  logic            bf_busy,
  input  logic            bf_done,
  input  logic            bf_found,
  input  logic            bf_cycle_ok,
  input  idx_t            found_src,
  input  idx_t            found_dst,
  input  idx_t            cycle_len
);

  logic            clearing;
  logic [GA_W-1:0] clr_g;
  idx_t            reg_src, reg_dst;
  logic            wr_acc;

  assign waitrequest = chipselect && write && (clearing || bf_busy);
  assign wr_acc      = chipselect && write && !clearing && !bf_busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      clearing  <= 1'b1;
      clr_g     <= '0;
      reg_src   <= '0;
      reg_dst   <= '0;
      bf_source <= '0;
    end else begin
      if (clearing) begin
        if (int'(clr_g) == NG - 1) clearing <= 1'b0;
        clr_g <= clr_g + 1'b1;
      end
      if (wr_acc) begin
        case (address)
          3'd0: reg_src   <= idx_t'(writedata);
          3'd1: reg_dst   <= idx_t'(writedata);
          3'd3: bf_source <= idx_t'(writedata);
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    am_clr_en    = clearing;
    am_clr_group = clr_g;
    am_wr_en     = wr_acc && (address == 3'd2);
    am_wr_src    = reg_src;
    am_wr_dst    = reg_dst;
    am_wr_weight = edge_w_t'(writedata);
    bf_start     = wr_acc && (address == 3'd4) && writedata[0];
    readdata     = '0;
    if (chipselect && read) begin
      case (address)
        3'd0:    readdata = {12'b0, bf_cycle_ok, bf_found, bf_done, bf_busy};
        3'd1:    readdata = {1'b0, found_src, 1'b0, found_dst};
        3'd2:    readdata = 16'(cycle_len);
        default: readdata = '0;
      endcase
    end
  end

endmodule
