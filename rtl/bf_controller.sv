// bf_controller: sequencer of one Bellman-Ford arbitrage run.
//
// On start it loads the vertex table (source 0, others INFINITY), then runs
// V-1 relaxation sweeps and one detection sweep over all NG edge groups,
// issuing one group of P edges per clock: rd_group is the group, issue
// marks a valid issue, and src0/dst0 give the source i and destination j of
// the group's first edge (the edge after (i,j) is (i+1,j), wrapping to
// (0,j+1)), which spares the datapath a division by V. After each sweep it
// idles DRAIN clocks so the last relaxations are written before the next
// sweep reads. If the detection sweep found a negative cycle it starts the
// decision maker and waits for it. busy is high from start to done; done
// stays high until the next start. A run takes about
// 1 + V*(NG + DRAIN) clocks plus the decision maker's time (V = 66:
// 65 sweeps of 1089 groups, then the detection sweep).
// The sweep order (V-1 relaxation passes, then one detection pass) follows
// Algorithm 5.1 of the design; the drain gap and the counters are this
// design's own.
module bf_controller
  import fx_pkg::*;
#(
  parameter int V     = 66,
  parameter int NG    = (V*V + P - 1) / P,
  parameter int GA_W  = (NG > 1) ? $clog2(NG) : 1,
  parameter int DRAIN = 3
)(
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  output logic            vt_init,
  output logic            issue,
  output logic            detect,     // issue belongs to the detection sweep
  output logic            det_clear,  // start of the detection sweep
  output logic [GA_W-1:0] rd_group,
  output idx_t            src0,
  output idx_t            dst0,
  input  logic            found,
  output logic            dm_start,
  input  logic            dm_done,
  output logic            busy,
  output logic            done,
  output logic [15:0]     sweep_cnt
);

  typedef enum logic [2:0] {C_IDLE, C_INIT, C_SWEEP, C_DRAIN, C_DECIDE, C_WAIT, C_DONE} cstate_t;

  cstate_t         state;
  logic [GA_W-1:0] g;
  idx_t            si, dj;
  int              drain_cnt;
  int              sweep;      // 0 .. V-2 relaxation, V-1 detection

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= C_IDLE;
      g         <= '0;
      si        <= '0;
      dj        <= '0;
      drain_cnt <= 0;
      sweep     <= 0;
      done      <= 1'b0;
    end else begin
      case (state)
        C_IDLE, C_DONE: if (start) begin
          done  <= 1'b0;
          sweep <= 0;
          state <= C_INIT;
        end
        C_INIT: begin
          g     <= '0;
          si    <= '0;
          dj    <= '0;
          state <= C_SWEEP;
        end
        C_SWEEP: begin
          if (int'(g) == NG - 1) begin
            drain_cnt <= 0;
            state     <= C_DRAIN;
          end else begin
            g <= g + 1'b1;
            if (int'(si) + P >= V) begin
              si <= idx_t'(int'(si) + P - V);
              dj <= dj + 1'b1;
            end else begin
              si <= si + idx_t'(P);
            end
          end
        end
        C_DRAIN: begin
          if (drain_cnt == DRAIN - 1) begin
            if (sweep == V - 1) begin
              state <= found ? C_DECIDE : C_DONE;
              if (!found) done <= 1'b1;
            end else begin
              sweep <= sweep + 1;
              g     <= '0;
              si    <= '0;
              dj    <= '0;
              state <= C_SWEEP;
            end
          end else begin
            drain_cnt <= drain_cnt + 1;
          end
        end
        C_DECIDE: state <= C_WAIT;
        C_WAIT: if (dm_done) begin
          done  <= 1'b1;
          state <= C_DONE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  always_comb begin
    vt_init   = (state == C_INIT);
    issue     = (state == C_SWEEP);
    detect    = (state == C_SWEEP) && (sweep == V - 1);
    det_clear = (state == C_INIT);
    rd_group  = g;
    src0      = si;
    dst0      = dj;
    dm_start  = (state == C_DECIDE);
    busy      = (state != C_IDLE) && (state != C_DONE);
    sweep_cnt = 16'(sweep);
  end

endmodule
