// tsv_deserializer: rebuilds flits from the beats of a TSV bundle.
//
// Beats arrive least significant first with tsv_valid high, as sent by
// tsv_serializer. After RATIO beats the whole flit is presented on out_flit
// with out_valid high for one cycle, one clock edge after the last beat. Beats
// are counted from reset, so the two ends stay aligned as long as the sender
// always sends whole flits. There is no backpressure: the receiving router
// has buffer space for every flit it gave a credit for.
module tsv_deserializer #(
  parameter int unsigned FLIT_W = noc_pkg::FLIT_W,
  parameter int unsigned RATIO  = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      tsv_valid,
  input  logic [FLIT_W/RATIO-1:0]   tsv_data,
  output logic                      out_valid,
  output logic [FLIT_W-1:0]         out_flit
);
  localparam int unsigned BW = FLIT_W / RATIO;
  localparam int unsigned CW = $clog2(RATIO > 1 ? RATIO : 2);

  logic [FLIT_W-1:0] acc_q;
  logic [CW-1:0]     beat_q;
  logic [FLIT_W-1:0] acc_next;

  assign acc_next = {tsv_data, acc_q[FLIT_W-1:BW]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      beat_q    <= '0;
      out_valid <= 1'b0;
      out_flit  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (tsv_valid) begin
        acc_q <= acc_next;
        if (int'(beat_q) == RATIO - 1) begin
          beat_q    <= '0;
          out_valid <= 1'b1;
          out_flit  <= acc_next;
        end else begin
          beat_q <= beat_q + 1'b1;
        end
      end
    end
  end
endmodule
