// decision_maker: turns a detected negative cycle into a list of trades.
//
// start gives the vertex j whose weight the cycle detector could still
// lower. The module first follows predecessors V times from j, which puts
// it on the cycle, then follows them once around the cycle into a buffer.
// Predecessors point backwards along the trades, so the buffer is played
// out in reverse: each trade_valid clock gives one exchange, sell
// trade_from and buy trade_to, and trade_last marks the trade that closes
// the cycle. If a NULL predecessor is met or the loop does not close within
// V steps, done rises with cycle_ok = 0 and no trade is sent. One
// predecessor lookup (combinational, pr_idx -> pr_pred) is made per clock;
// a cycle of n trades takes about V + 2n + 2 clocks. Tracing back and
// producing the trade order follow the design description; the walk of V
// steps, the buffer and the trade stream format are this design's own.
module decision_maker
  import fx_pkg::*;
#(
  parameter int V = 66
)(
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  idx_t start_vertex,
  output idx_t pr_idx,
  input  idx_t pr_pred,
  output logic trade_valid,
  output idx_t trade_from,
  output idx_t trade_to,
  output logic trade_last,
  output logic done,
  output logic cycle_ok,
  output idx_t cycle_len
);

  typedef enum logic [2:0] {S_IDLE, S_WALK, S_COLLECT, S_EMIT, S_DONE} state_t;

  state_t state;
  idx_t   cur;
  idx_t   anchor;
  int     steps;
  idx_t   n;      // entries in buf
  idx_t   m;      // emit position, n down to 1
  idx_t   buf_q [V];

  assign pr_idx = cur;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      cur      <= '0;
      anchor   <= '0;
      steps    <= 0;
      n        <= '0;
      m        <= '0;
      done     <= 1'b0;
      cycle_ok <= 1'b0;
      cycle_len <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          cur       <= start_vertex;
          steps     <= 0;
          done      <= 1'b0;
          cycle_ok  <= 1'b0;
          cycle_len <= '0;
          state     <= S_WALK;
        end
        S_WALK: begin
          if (pr_pred == IDX_NULL || int'(pr_pred) >= V) begin
            done  <= 1'b1;
            state <= S_DONE;
          end else if (steps == V - 1) begin
            anchor   <= pr_pred;
            cur      <= pr_pred;
            n        <= '0;
            state    <= S_COLLECT;
          end else begin
            cur   <= pr_pred;
            steps <= steps + 1;
          end
        end
        S_COLLECT: begin
          buf_q[n] <= cur;
          if (pr_pred == IDX_NULL || int'(pr_pred) >= V || int'(n) == V - 1) begin
            done  <= 1'b1;
            state <= S_DONE;
          end else if (pr_pred == anchor) begin
            n         <= n + 1'b1;
            m         <= n + 1'b1;
            cycle_len <= n + 1'b1;
            state     <= S_EMIT;
          end else begin
            n   <= n + 1'b1;
            cur <= pr_pred;
          end
        end
        S_EMIT: begin
          m <= m - 1'b1;
          if (m == idx_t'(1)) begin
            done     <= 1'b1;
            cycle_ok <= 1'b1;
            state    <= S_DONE;
          end
        end
        S_DONE: if (start) begin
          cur       <= start_vertex;
          steps     <= 0;
          done      <= 1'b0;
          cycle_ok  <= 1'b0;
          cycle_len <= '0;
          state     <= S_WALK;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    trade_valid = (state == S_EMIT);
    trade_from  = buf_q[(m == n) ? idx_t'(0) : m];
    trade_to    = buf_q[m - 1'b1];
    trade_last  = (state == S_EMIT) && (m == idx_t'(1));
  end

endmodule
