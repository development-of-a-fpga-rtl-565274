`timescale 1ps/1fs
// tdc_channel: one input channel of the TDC, measuring both edges of the
// input signal.
//
// The input feeds two tapped delay lines, each behind its own wave-union
// launcher: the leading-edge line sees the signal, the trailing-edge line its
// inverse, so both measure rising edges. Each line has its own encoder and
// calibration LUT (tdc_line), and both write into one shared L1 buffer, as the
// design description gives it (two delay lines per input, one 256-hit buffer
// shared by leading and trailing edges).
//
// During calibration (`cal_sel` high) both lines are fed from the
// calibration clock `cal_clk` instead of the input, so that their LUTs can be
// built by the code density test. Feeding the same calibration clock, not
// inverted, to the trailing line is this design's choice.
//
// The launchers and delay lines are behavioural models (see their files);
// everything else here is synthesizable.
//
// Timing: hits reach the L1 buffer three clocks after the delay-line snapshot
// (two in tdc_line, one in the merge queue).
module tdc_channel #(
  parameter int unsigned N_TAPS        = 192,
  parameter int unsigned BIN_BITS      = 9,
  parameter bit          WAVE_UNION    = 1'b1,
  parameter int unsigned NCAL_LOG2     = 16,
  parameter int unsigned DEPTH         = 256,
  parameter int unsigned WINDOW_CYCLES = 8192,
  parameter int unsigned SEED          = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             hit_in,
  input  logic             cal_clk,
  input  logic             cal_sel,
  input  logic             cal_start,
  input  tdc_pkg::coarse_t coarse,
  input  logic             trig,
  input  tdc_pkg::ts_t     trig_ts,
  output logic             out_valid,
  input  logic             out_ready,
  output tdc_pkg::l1_hit_t out,
  output logic             busy,
  output logic             done,
  output logic             lost,
  output logic             cal_busy,
  output logic             cal_done
);

  import tdc_pkg::*;

  logic              lead_in, trail_in, lead_wave, trail_wave;
  logic [N_TAPS-1:0] lead_taps, trail_taps;
  logic              lead_valid, trail_valid;
  ts_t               lead_ts, trail_ts;
  logic [1:0]        busy_l, done_l;

  assign lead_in  = cal_sel ? cal_clk :  hit_in;
  assign trail_in = cal_sel ? cal_clk : !hit_in;

  wave_union_launcher #(.WAVE_UNION(WAVE_UNION)) u_lau_lead  (.hit(lead_in),  .wave(lead_wave));
  wave_union_launcher #(.WAVE_UNION(WAVE_UNION)) u_lau_trail (.hit(trail_in), .wave(trail_wave));

  tapped_delay_line #(.N_TAPS(N_TAPS), .SEED(2 * SEED))     u_tdl_lead  (.clk, .din(lead_wave),  .taps(lead_taps));
  tapped_delay_line #(.N_TAPS(N_TAPS), .SEED(2 * SEED + 1)) u_tdl_trail (.clk, .din(trail_wave), .taps(trail_taps));

  tdc_line #(.N_TAPS(N_TAPS), .BIN_BITS(BIN_BITS), .WAVE_UNION(WAVE_UNION), .NCAL_LOG2(NCAL_LOG2)) u_lead (
    .clk, .rst, .cal_start, .taps(lead_taps), .coarse,
    .cal_busy(busy_l[0]), .cal_done(done_l[0]), .raw_hit(), .raw_bin(),
    .hit_valid(lead_valid), .hit_ts(lead_ts)
  );

  tdc_line #(.N_TAPS(N_TAPS), .BIN_BITS(BIN_BITS), .WAVE_UNION(WAVE_UNION), .NCAL_LOG2(NCAL_LOG2)) u_trail (
    .clk, .rst, .cal_start, .taps(trail_taps), .coarse,
    .cal_busy(busy_l[1]), .cal_done(done_l[1]), .raw_hit(), .raw_bin(),
    .hit_valid(trail_valid), .hit_ts(trail_ts)
  );

  l1_buffer #(.DEPTH(DEPTH), .WINDOW_CYCLES(WINDOW_CYCLES)) u_l1 (
    .clk, .rst, .lead_valid, .lead_ts, .trail_valid, .trail_ts,
    .trig, .trig_ts, .out_valid, .out_ready, .out, .busy, .done, .lost
  );

  assign cal_busy = |busy_l;
  assign cal_done = &done_l;

endmodule
