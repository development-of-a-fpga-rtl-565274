`timescale 1ps/1fs
// wave_union_launcher: behavioural model of the "wave union launcher A".
//
// Behavioural model, not synthesizable logic: in the FPGA the launcher is a
// few carry-chain and LUT cells whose output pattern is set by routing
// delays. The model captures only the timing at its output.
//
// With WAVE_UNION = 1 every rising edge of `hit` launches a fixed pulse of
// WIDTH_PS into the delay line, so the line holds two edges of one hit (a
// rising front and a falling rear). The encoder then measures both edges and
// uses the sum of their tap positions as a virtual bin, which about doubles
// the number of bins per clock period. How the pulse is shaped inside the
// launcher is not given by the design description; a fixed-width pulse is this
// model's reading of "a fixed pulse pattern having two pulse edges". The
// default width of 300 ps (about 15 taps) is taken from the wave-union
// calibration curve, which starts at a virtual bin id of about 15.
//
// With WAVE_UNION = 0 the launcher is a plain wire: one edge per hit.
module wave_union_launcher #(
  parameter bit  WAVE_UNION = 1'b1,
  parameter real WIDTH_PS   = 300.0
) (
  input  logic hit,
  output logic wave
);

  if (WAVE_UNION) begin : g_wu
    logic pulse;
    initial pulse = 1'b0;
    always @(posedge hit) begin
      pulse <= 1'b1;
      pulse <= #(WIDTH_PS) 1'b0;
    end
    assign wave = pulse;
  end else begin : g_plain
    assign wave = hit;
  end

endmodule
