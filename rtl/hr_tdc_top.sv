`timescale 1ps/1fs
// hr_tdc_top: 16-channel high-resolution TDC with a common stop.
//
// Time is measured in two parts. A coarse counter counts periods of the
// 375 MHz sampling clock (2.667 ns). Inside a period the time is interpolated
// by a tapped delay line: a carry chain whose taps are sampled by flip-flops
// at every clock edge, so the position of the signal's edge in the snapshot
// tells how long before the clock edge the hit came. Because the taps differ
// in delay, each line has a calibration LUT, built by a code density test
// from a calibration clock whose phase drifts against the sampling clock.
// Wave-union launchers put two edges of each hit into the line, and the sum of
// both positions is the bin id, which halves the mean bin width.
//
// The top holds N_CH channels (each with a leading-edge and a trailing-edge
// line and an L1 buffer of 256 hits) and one common-stop line, 16 x 2 + 1 = 33
// delay lines at the defaults, as in the design description. A hit on the stop
// line starts a search in every channel's L1 buffer; the hits found within
// WINDOW_CYCLES clocks before the stop are sent out as {channel, edge,
// stop - hit} words through a round-robin arbiter. The readout, the window
// and the trigger handling are this design's own.
//
// Calibration: a pulse on `cal_start` makes every line build its LUT. While
// any line is calibrating, all line inputs are switched to `cal_clk`, which in
// the FPGA comes from cascaded PLLs at 26.4528 MHz. `cal_done` goes high
// when every LUT is ready; hits are measured from then on.
//
// Timestamps and `out.dt` are in units of 1/4096 of a clock period
// (about 0.651 ps). A stop that arrives while a search is running is ignored.
module hr_tdc_top #(
  parameter int unsigned N_CH          = 16,
  parameter int unsigned N_TAPS        = 192,
  parameter int unsigned BIN_BITS      = 9,
  parameter bit          WAVE_UNION    = 1'b1,
  parameter int unsigned NCAL_LOG2     = 16,
  parameter int unsigned DEPTH         = 256,
  parameter int unsigned WINDOW_CYCLES = 8192
) (
  input  logic               clk,        // 375 MHz sampling clock
  input  logic               rst,
  input  logic               cal_clk,    // calibration clock from the PLLs
  input  logic               cal_start,
  input  logic [N_CH-1:0]    hit_in,
  input  logic               stop_in,
  output logic               out_valid,
  input  logic               out_ready,
  output tdc_pkg::tdc_word_t out,
  output logic               cal_done,
  output logic               busy,       // a stop search is running
  output logic [N_CH-1:0]    lost        // a channel dropped a hit
);

  import tdc_pkg::*;

  coarse_t coarse;
  logic    cal_sel;

  coarse_counter u_coarse (.clk, .rst, .en(1'b1), .count(coarse));

  // ---------------- common stop line ----------------
  logic              stop_mux, stop_wave;
  logic [N_TAPS-1:0] stop_taps;
  logic              stop_valid, stop_busy, stop_done;
  ts_t               stop_ts;

  assign stop_mux = cal_sel ? cal_clk : stop_in;

  wave_union_launcher #(.WAVE_UNION(WAVE_UNION)) u_lau_stop (.hit(stop_mux), .wave(stop_wave));
  tapped_delay_line #(.N_TAPS(N_TAPS), .SEED(1000)) u_tdl_stop (.clk, .din(stop_wave), .taps(stop_taps));

  tdc_line #(.N_TAPS(N_TAPS), .BIN_BITS(BIN_BITS), .WAVE_UNION(WAVE_UNION), .NCAL_LOG2(NCAL_LOG2)) u_stop (
    .clk, .rst, .cal_start, .taps(stop_taps), .coarse,
    .cal_busy(stop_busy), .cal_done(stop_done), .raw_hit(), .raw_bin(),
    .hit_valid(stop_valid), .hit_ts(stop_ts)
  );

  // ---------------- channels ----------------
  logic    [N_CH-1:0] ch_valid, ch_ready, ch_busy, ch_cal_busy, ch_cal_done;
  l1_hit_t [N_CH-1:0] ch_data;
  logic               trig;

  assign trig = stop_valid && !busy;

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    tdc_channel #(
      .N_TAPS(N_TAPS), .BIN_BITS(BIN_BITS), .WAVE_UNION(WAVE_UNION), .NCAL_LOG2(NCAL_LOG2),
      .DEPTH(DEPTH), .WINDOW_CYCLES(WINDOW_CYCLES), .SEED(c + 1)
    ) u_ch (
      .clk, .rst, .hit_in(hit_in[c]), .cal_clk, .cal_sel, .cal_start, .coarse,
      .trig, .trig_ts(stop_ts),
      .out_valid(ch_valid[c]), .out_ready(ch_ready[c]), .out(ch_data[c]),
      .busy(ch_busy[c]), .done(), .lost(lost[c]),
      .cal_busy(ch_cal_busy[c]), .cal_done(ch_cal_done[c])
    );
  end

  readout_arbiter #(.N_CH(N_CH)) u_arb (
    .clk, .rst, .in_valid(ch_valid), .in_ready(ch_ready), .in_data(ch_data),
    .out_valid, .out_ready, .out
  );

  always_ff @(posedge clk) begin
    if (rst) cal_sel <= 1'b0;
    else     cal_sel <= stop_busy || (|ch_cal_busy);
  end

  assign busy     = |ch_busy;
  assign cal_done = stop_done && (&ch_cal_done);

endmodule
