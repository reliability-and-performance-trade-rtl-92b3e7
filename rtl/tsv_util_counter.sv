// tsv_util_counter: utilization counter for the TSV bundle attached to a
// router.
//
// Each router keeps a count of the clock cycles in which its TSV bundle
// actually carries data. The utilization of the bundle is this count divided
// by the number of cycles simulated (or run); the same run time applies to
// every bundle of a region, so the pruning logic compares the raw counts. The
// count is cumulative, because wear-out of a via accumulates over its whole
// active life, and it saturates rather than wrapping so that a long-lived,
// heavily used bundle never looks idle again. A free-running cycle counter of
// the same width gives the denominator.
//
// Interface: `active` is sampled on every rising clock edge; `clear` restarts
// both counts (for instance at the start of a measurement). `count` and
// `cycles` are registered and change one cycle after the sampled edge.
// Counting whole cycles of activity and saturating are this design's choices;
// the evaluated design only states that each router has such a counter.
module tsv_util_counter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             active,
  output logic [WIDTH-1:0] count,
  output logic [WIDTH-1:0] cycles
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      cycles <= '0;
    end else if (clear) begin
      count  <= '0;
      cycles <= '0;
    end else begin
      if (active && count != '1) count <= count + 1'b1;
      if (cycles != '1) cycles <= cycles + 1'b1;
    end
  end
endmodule
