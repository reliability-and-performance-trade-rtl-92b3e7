// rr_arbiter: round-robin arbiter over N requesters.
//
// The grant goes to the first requester at or after the priority pointer,
// wrapping round. When `advance` is high in a cycle with a grant, the pointer
// moves to the requester just after the winner, so a requester that keeps
// asking is served at least once every N grants. The grant is combinational
// from `req` and the pointer; the pointer is the only state and resets to 0.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N > 1 ? N : 2)-1:0] gnt_idx,
  output logic                 gnt_any
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);

  logic [IW-1:0] ptr_q;

  always_comb begin
    int unsigned idx;
    gnt     = '0;
    gnt_idx = '0;
    gnt_any = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      idx = (int'(ptr_q) + k) % N;
      if (!gnt_any && req[idx]) begin
        gnt_any      = 1'b1;
        gnt[idx]     = 1'b1;
        gnt_idx      = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q <= '0;
    end else if (advance && gnt_any) begin
      ptr_q <= (int'(gnt_idx) + 1 == int'(N)) ? '0 : gnt_idx + 1'b1;
    end
  end
endmodule
