// tsv_prune_unit: the pruning rule of the prune-and-update TSV scheme.
//
// One unit serves a region of N TSV bundles (by default the 16 bundles
// between one pair of planar layers). On `start` it takes a snapshot of the N
// utilization counts and decides, for each bundle, whether its utilization is
// more than one standard deviation above the region's mean. Flagged bundles
// are "pruned": the routers stop choosing them while another shortest path
// exists (the update rule, in alash_route_unit).
//
// The test is done without division or square root. With S = sum(u),
// Q = sum(u^2) and n = N:
//     u > mean + std   <=>   n*u - S > 0   and   (n*u - S)^2 > n*Q - S^2
// since n^2 * variance = n*Q - S^2. The unit works serially: N cycles to
// accumulate S and Q (one squarer), then N cycles to test each bundle, then the
// flags are updated together. A new `start` while busy is ignored.
//
// Interface: `util` holds the N counts; `start` is a one-cycle pulse; `busy`
// is high from the cycle after `start` until `pruned` is updated; `done`
// pulses in the cycle `pruned` changes. Latency: 2*N+1 cycles from `start`.
// The rule itself (mean plus one standard deviation over a region) follows
// the evaluated design; the serial datapath, the snapshot and the exact test
// above are this design's own implementation of it.
module tsv_prune_unit #(
  parameter int unsigned N     = 16,
  parameter int unsigned UW    = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [UW-1:0]       util [N],
  output logic [N-1:0]        pruned,
  output logic                busy,
  output logic                done
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);
  localparam int unsigned NW = $clog2(N + 1);
  localparam int unsigned SW = UW + NW;          // width of S and n*u
  localparam int unsigned QW = 2 * UW + NW;      // width of Q
  localparam int unsigned TW = 2 * SW + 2;       // width of the compared terms

  typedef enum logic [1:0] {ST_IDLE, ST_ACCUM, ST_TEST, ST_DONE} state_e;

  state_e          state_q;
  logic [IW-1:0]   idx_q;
  logic [UW-1:0]   snap_q [N];
  logic [SW-1:0]   sum_q;
  logic [QW-1:0]   sq_q;
  logic [N-1:0]    flag_q;

  logic [UW-1:0]   u_cur;
  logic [SW-1:0]   nu;
  logic            above_mean;
  logic [TW-1:0]   dev_sq;
  logic [TW-1:0]   nvar;

  assign u_cur      = snap_q[idx_q];
  assign nu         = SW'(N) * SW'(u_cur);
  assign above_mean = nu > sum_q;
  assign dev_sq     = TW'(nu - sum_q) * TW'(nu - sum_q);
  assign nvar       = TW'(N) * TW'(sq_q) - TW'(sum_q) * TW'(sum_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      idx_q   <= '0;
      sum_q   <= '0;
      sq_q    <= '0;
      flag_q  <= '0;
      pruned  <= '0;
      done    <= 1'b0;
      for (int i = 0; i < N; i++) snap_q[i] <= '0;
    end else begin
      done <= 1'b0;
      case (state_q)
        ST_IDLE: if (start) begin
          for (int i = 0; i < N; i++) snap_q[i] <= util[i];
          idx_q   <= '0;
          sum_q   <= '0;
          sq_q    <= '0;
          state_q <= ST_ACCUM;
        end
        ST_ACCUM: begin
          sum_q <= sum_q + SW'(u_cur);
          sq_q  <= sq_q + QW'(u_cur) * QW'(u_cur);
          if (int'(idx_q) == N - 1) begin
            idx_q   <= '0;
            state_q <= ST_TEST;
          end else begin
            idx_q <= idx_q + 1'b1;
          end
        end
        ST_TEST: begin
          flag_q[idx_q] <= above_mean && (dev_sq > nvar);
          if (int'(idx_q) == N - 1) begin
            idx_q   <= '0;
            state_q <= ST_DONE;
          end else begin
            idx_q <= idx_q + 1'b1;
          end
        end
        default: begin  // ST_DONE
          pruned  <= flag_q;
          done    <= 1'b1;
          state_q <= ST_IDLE;
        end
      endcase
    end
  end

  assign busy = (state_q != ST_IDLE);
endmodule
