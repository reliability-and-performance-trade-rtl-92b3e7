// vc_input_buffer: the input buffer of one router port.
//
// The port has NUM_VC virtual channels, each a first-in first-out queue of
// DEPTH flits (4 channels of 2 flits in the evaluated routers). An arriving
// flit is written into the queue named by its vc field. Every queue shows its
// oldest flit on front[v] with front_valid[v]; pulsing deq[v] removes it. A
// flit may be written and another removed from the same queue in one cycle.
//
// Flow control is by credits, so an arriving flit always finds space; an
// assertion checks this. A written flit is visible at the front one cycle
// after the edge that writes it. Circular queues with read and write pointers
// and a fill count are this design's choice.
module vc_input_buffer
  import noc_pkg::*;
#(
  parameter int unsigned VCS   = NUM_VC,
  parameter int unsigned DEPTH = BUF_DEPTH
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  flit_t              in_flit,
  output flit_t              front [VCS],
  output logic [VCS-1:0]     front_valid,
  input  logic [VCS-1:0]     deq,
  output logic [VCS-1:0]     full
);
  localparam int unsigned PW = $clog2(DEPTH > 1 ? DEPTH : 2);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  flit_t         mem_q [VCS][DEPTH];
  logic [PW-1:0] rd_q  [VCS];
  logic [PW-1:0] wr_q  [VCS];
  logic [CW-1:0] cnt_q [VCS];

  function automatic logic [PW-1:0] ptr_inc(logic [PW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    for (int v = 0; v < VCS; v++) begin
      front[v]       = mem_q[v][rd_q[v]];
      front_valid[v] = (cnt_q[v] != '0);
      full[v]        = (int'(cnt_q[v]) == DEPTH);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < VCS; v++) begin
        rd_q[v]  <= '0;
        wr_q[v]  <= '0;
        cnt_q[v] <= '0;
        for (int d = 0; d < DEPTH; d++) mem_q[v][d] <= '0;
      end
    end else begin
      for (int v = 0; v < VCS; v++) begin
        logic wr, rd;
        wr = in_valid && (int'(in_flit.vc) == v);
        rd = deq[v] && front_valid[v];
        if (wr) begin
          mem_q[v][wr_q[v]] <= in_flit;
          wr_q[v]           <= ptr_inc(wr_q[v]);
        end
        if (rd) rd_q[v] <= ptr_inc(rd_q[v]);
        if (wr && !rd) cnt_q[v] <= cnt_q[v] + 1'b1;
        else if (rd && !wr) cnt_q[v] <= cnt_q[v] - 1'b1;
      end
    end
  end

  // A credit-respecting sender never writes into a full queue unless the
  // same queue is read in that cycle.
  always_ff @(posedge clk) begin
    if (rst_n && in_valid) begin
      assert (!full[in_flit.vc] || deq[in_flit.vc])
        else $error("vc_input_buffer: write into full virtual channel %0d", in_flit.vc);
    end
  end
endmodule
