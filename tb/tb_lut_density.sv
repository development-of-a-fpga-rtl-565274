`timescale 1ps/1fs
// tb_lut_density: the calibration LUT and bin widths of one delay line at the
// default calibration size, with and without wave union.
//
// Two lines at their default parameters (192 taps, 2^16 calibration hits) sit
// on the same carry-chain model, one behind a wave-union launcher and one
// plain. Both are fed the 26.4528 MHz calibration clock until their LUTs are
// built. The testbench keeps its own histogram of the bins that the encoders
// report while the LUTs accumulate, and from it:
//   * checks every LUT word against (2*S + H) >> (NCAL_LOG2 + 1 - 12), where H
//     is the bin's count and S the count of all lower bins, and 0 above the
//     last bin hit;
//   * counts the bins that received hits and the mean bin width, T / bins.
// A plain line must span one clock period with 120 to 180 bins of 14 to 23 ps
// on average; the wave-union line must have 1.6 to 2.4 times as many bins,
// i.e. bins of roughly half the width. The LUT must rise monotonically over
// the bins hit and end close to one period (4096 units).
module tb_lut_density;
  import tdc_pkg::*;
  localparam int  N = 192;
  localparam int  NL = 16;
  localparam int  NB = 512;
  localparam real T = 1.0e6 / 375.0;
  localparam real TCAL = 1.0e6 / 26.4528;

  logic    clk = 1'b0, rst = 1'b1, cal_start = 1'b0, cal_clk = 1'b0;
  logic    wave_w, wave_p;
  logic [N-1:0] taps_w, taps_p;
  coarse_t coarse;
  logic    busy_w, busy_p, done_w, done_p, rh_w, rh_p;
  logic [8:0] rb_w, rb_p;
  int      checks = 0, failures = 0;
  int      hist_w [NB], hist_p [NB];

  coarse_counter u_cc (.clk, .rst, .en(1'b1), .count(coarse));
  wave_union_launcher #(.WAVE_UNION(1'b1)) u_lw (.hit(cal_clk), .wave(wave_w));
  wave_union_launcher #(.WAVE_UNION(1'b0)) u_lp (.hit(cal_clk), .wave(wave_p));
  tapped_delay_line #(.SEED(21)) u_dw (.clk, .din(wave_w), .taps(taps_w));
  tapped_delay_line #(.SEED(21)) u_dp (.clk, .din(wave_p), .taps(taps_p));

  tdc_line #(.WAVE_UNION(1'b1)) dut_w (
    .clk, .rst, .cal_start, .taps(taps_w), .coarse, .cal_busy(busy_w), .cal_done(done_w),
    .raw_hit(rh_w), .raw_bin(rb_w), .hit_valid(), .hit_ts());
  tdc_line #(.WAVE_UNION(1'b0)) dut_p (
    .clk, .rst, .cal_start, .taps(taps_p), .coarse, .cal_busy(busy_p), .cal_done(done_p),
    .raw_hit(rh_p), .raw_bin(rb_p), .hit_valid(), .hit_ts());

  always #(T / 2.0) clk = !clk;
  always #(TCAL / 2.0) cal_clk = !cal_clk;

  // The histogram the LUT is built from: hits seen while accumulating
  always @(posedge clk) begin
    if (rh_w && dut_w.u_lut.state == 3'd2) hist_w[rb_w]++;
    if (rh_p && dut_p.u_lut.state == 3'd2) hist_p[rb_p]++;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  // Compares a LUT with the histogram; returns the number of bins hit.
  function automatic int evaluate(string name, int hist [NB], bit is_w);
    int s = 0, total = 0, lo = -1, hi = -1, nbins = 0, prev = -1, bad = 0, word, want;
    for (int b = 0; b < NB; b++) begin
      total += hist[b];
      if (hist[b] > 0) begin
        if (lo < 0) lo = b;
        hi = b;
        nbins++;
      end
    end
    check(total == 2 ** NL, $sformatf("%s: %0d calibration hits counted", name, total));
    for (int b = 0; b < NB; b++) begin
      word = is_w ? int'(dut_w.u_lut.u_ram.mem[b]) : int'(dut_p.u_lut.u_ram.mem[b]);
      want = (b > hi) ? 0 : ((2 * s + hist[b]) >> (NL + 1 - FINE_BITS));
      if (word != want) bad++;
      if (b >= lo && b <= hi) begin
        if (word < prev) bad++;
        prev = word;
      end
      s += hist[b];
    end
    check(bad == 0, $sformatf("%s: %0d LUT words differ from the histogram", name, bad));
    check(prev > 4000 && prev < 4096, $sformatf("%s: LUT ends at %0d of 4096", name, prev));
    $display("%s: bins %0d .. %0d, %0d bins hit, mean bin width %0.1f ps, LUT ends at %0d",
             name, lo, hi, nbins, T / real'(nbins), prev);
    return nbins;
  endfunction

  initial begin
    #6ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bins_w, bins_p;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    cal_start = 1'b1;
    @(negedge clk);
    cal_start = 1'b0;
    wait (done_w && done_p);
    repeat (4) @(negedge clk);
    bins_p = evaluate("plain", hist_p, 1'b0);
    bins_w = evaluate("wave union", hist_w, 1'b1);
    check(bins_p >= 120 && bins_p <= 180, "plain: about 145 bins per period");
    check(T / real'(bins_p) > 14.0 && T / real'(bins_p) < 23.0, "plain: mean bin width about 20 ps");
    check(real'(bins_w) > 1.6 * real'(bins_p) && real'(bins_w) < 2.4 * real'(bins_p),
          "wave union: about twice as many bins");
    $display("wave union / plain bins: %0.2f", real'(bins_w) / real'(bins_p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
