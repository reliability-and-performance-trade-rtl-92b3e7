// tsv_serializer: sends a flit over a TSV bundle RATIO times narrower than
// the flit.
//
// A flit offered with in_valid while in_ready is high is loaded into a shift
// register and leaves as RATIO beats of FLIT_W/RATIO bits, least significant
// beat first, on the RATIO cycles that follow. tsv_valid marks each beat.
// in_ready is high while idle and also during the last beat, so a new flit can
// follow without a gap: the bundle then carries one flit every RATIO cycles.
// send_ok looks one cycle ahead, for a sender whose flit reaches in_valid one
// cycle after it decides to send (a router's output register): a flit
// offered in the cycle after send_ok was high is always taken.
// The 4:1 ratio is the evaluated design's; sending the beats at the router
// clock rate (rather than on a faster serial clock) is this design's choice.
module tsv_serializer #(
  parameter int unsigned FLIT_W = noc_pkg::FLIT_W,
  parameter int unsigned RATIO  = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [FLIT_W-1:0]         in_flit,
  output logic                      in_ready,
  output logic                      send_ok,
  output logic                      tsv_valid,
  output logic [FLIT_W/RATIO-1:0]   tsv_data
);
  localparam int unsigned BW = FLIT_W / RATIO;
  localparam int unsigned CW = $clog2(RATIO + 1);

  logic [FLIT_W-1:0] sh_q;
  logic [CW-1:0]     left_q;   // beats still to send, including the current one

  assign in_ready  = (left_q <= CW'(1));
  // A flit offered in the next cycle will be taken: at most two beats are left
  // now and no flit is being offered in this cycle.
  assign send_ok   = (left_q <= CW'(2)) && !in_valid;
  assign tsv_valid = (left_q != '0);
  assign tsv_data  = sh_q[BW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_q   <= '0;
      left_q <= '0;
    end else if (in_valid && in_ready) begin
      sh_q   <= in_flit;
      left_q <= CW'(RATIO);
    end else if (left_q != '0) begin
      sh_q   <= sh_q >> BW;
      left_q <= left_q - 1'b1;
    end
  end
endmodule
