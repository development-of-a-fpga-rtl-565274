`timescale 1ps/1fs
// tdc_line: digital back end of one tapped delay line.
//
// The flip-flop snapshot of the line goes through the encoder (hit detection
// and bin id) and then through the line's own calibration LUT, which turns
// the bin id into the time between the hit and the sampling clock edge. The
// hit time is the coarse count of that edge, shifted up by FINE_BITS, minus
// the LUT value:  ts = coarse * 2^FINE_BITS - LUT[bin]. The combination of a
// coarse clock count and a LUT-corrected fine time follows the design
// description; the subtraction form follows from the encoder measuring the
// distance from the hit to the next sampling edge.
//
// Interface: `taps` from the delay line's flip-flops, `coarse` from the shared
// coarse counter. `cal_start` begins a LUT build (see lut_calibrator); the
// line reports no hits until a LUT exists. `raw_hit`/`raw_bin` expose the
// encoder output, which the calibration uses.
//
// Timing: `hit_valid`/`hit_ts` come two clocks after the snapshot; one new hit
// can be taken every clock, so the line has no dead time beyond the encoder's
// one-hit-per-snapshot rule.
module tdc_line #(
  parameter int unsigned N_TAPS     = 192,
  parameter int unsigned BIN_BITS   = 9,
  parameter bit          WAVE_UNION = 1'b1,
  parameter int unsigned NCAL_LOG2  = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                cal_start,
  input  logic [N_TAPS-1:0]   taps,
  input  tdc_pkg::coarse_t    coarse,
  output logic                cal_busy,
  output logic                cal_done,
  output logic                raw_hit,
  output logic [BIN_BITS-1:0] raw_bin,
  output logic                hit_valid,
  output tdc_pkg::ts_t        hit_ts
);

  import tdc_pkg::*;

  coarse_t enc_coarse, lut_coarse;
  fine_t   fine;

  tdl_encoder #(.N_TAPS(N_TAPS), .BIN_BITS(BIN_BITS), .WAVE_UNION(WAVE_UNION)) u_enc (
    .clk, .rst, .taps, .coarse_in(coarse),
    .hit(raw_hit), .bin(raw_bin), .coarse_out(enc_coarse)
  );

  lut_calibrator #(.BIN_BITS(BIN_BITS), .FINE_BITS(FINE_BITS), .NCAL_LOG2(NCAL_LOG2)) u_lut (
    .clk, .rst, .cal_start, .hit(raw_hit), .bin(raw_bin),
    .cal_busy, .cal_done, .fine_valid(hit_valid), .fine
  );

  always_ff @(posedge clk) lut_coarse <= enc_coarse;

  assign hit_ts = {lut_coarse, FINE_BITS'(0)} - TS_BITS'(fine);

endmodule
