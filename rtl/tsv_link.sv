// tsv_link: one direction of a vertical link between two stacked routers.
//
// The sending router's flit is serialized 4:1 onto a bundle of FLIT_W/4 TSV
// signals and rebuilt at the receiving die. With the 36-bit link flit
// (32 data bits plus type and virtual channel) the bundle is 9 signals wide
// and carries one flit every 4 cycles. `active` is high in every cycle the
// bundle carries a beat; the router that owns the bundle counts these cycles
// to measure its utilization. The bundle wires are brought out for
// observation.
//
// Timing: a flit accepted (in_valid and in_ready) at a clock edge appears on
// out_valid/out_flit RATIO edges later. in_ready is the usual same-cycle
// handshake; send_ok is its one-cycle look-ahead, used by a router that
// registers its outputs (see tsv_serializer). Credits for the link travel on their
// own signals outside this module.
module tsv_link #(
  parameter int unsigned FLIT_W = noc_pkg::FLIT_W,
  parameter int unsigned RATIO  = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [FLIT_W-1:0]       in_flit,
  output logic                    in_ready,
  output logic                    send_ok,
  output logic                    out_valid,
  output logic [FLIT_W-1:0]       out_flit,
  output logic                    active,
  output logic [FLIT_W/RATIO-1:0] tsv_bus
);
  logic tsv_valid;

  tsv_serializer #(.FLIT_W(FLIT_W), .RATIO(RATIO)) u_ser (
    .clk, .rst_n, .in_valid, .in_flit, .in_ready, .send_ok,
    .tsv_valid, .tsv_data(tsv_bus)
  );

  tsv_deserializer #(.FLIT_W(FLIT_W), .RATIO(RATIO)) u_des (
    .clk, .rst_n, .tsv_valid, .tsv_data(tsv_bus),
    .out_valid, .out_flit
  );

  assign active = tsv_valid;

  // A sender using send_ok never offers a flit the serializer cannot take.
  logic send_ok_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) send_ok_q <= 1'b0;
    else send_ok_q <= send_ok;
  end
  always_ff @(posedge clk) begin
    if (rst_n && in_valid && !in_ready) begin
      assert (!send_ok_q) else $error("tsv_link: flit offered after send_ok but not taken");
    end
  end
endmodule
