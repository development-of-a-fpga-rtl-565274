`timescale 1ps/1fs
// tb_tdc_line: one complete delay line, calibrated and then measuring.
//
// Two lines run side by side on the same signals, one with a wave-union
// launcher and one plain, each with a launcher and delay-line model in front.
// First a calibration clock of 26.4528 MHz, whose phase drifts against the
// 375 MHz sampling clock, is fed in until both LUTs are built. Then hits at
// known, random times are fed in. The time between any hit and the first one,
// taken from the timestamps, must match the true time within 40 ps, and the
// RMS error must be below 15 ps. The build time of the LUT (clear, 2^NCAL_LOG2
// hits, two sweeps) is checked as well.
module tb_tdc_line;
  import tdc_pkg::*;
  localparam int  N = 192;
  localparam int  NL = 14;
  localparam real T = 1.0e6 / 375.0;
  localparam real TCAL = 1.0e6 / 26.4528;
  localparam real U = T / 4096.0;         // timestamp unit in ps

  logic    clk = 1'b0, rst = 1'b1, cal_start = 1'b0;
  logic    cal_clk = 1'b0, hit = 1'b0, cal_sel = 1'b0;
  logic    din, wave_w, wave_p;
  logic [N-1:0] taps_w, taps_p;
  coarse_t coarse;
  logic    busy_w, busy_p, done_w, done_p, v_w, v_p;
  ts_t     ts_w, ts_p;
  int      checks = 0, failures = 0;
  int      cal_cycles = 0, early = 0;

  realtime hit_time [$];
  ts_t     got_w [$], got_p [$];

  assign din = cal_sel ? cal_clk : hit;

  coarse_counter u_cc (.clk, .rst, .en(1'b1), .count(coarse));
  wave_union_launcher #(.WAVE_UNION(1'b1)) u_lw (.hit(din), .wave(wave_w));
  wave_union_launcher #(.WAVE_UNION(1'b0)) u_lp (.hit(din), .wave(wave_p));
  tapped_delay_line #(.N_TAPS(N), .SEED(11)) u_dw (.clk, .din(wave_w), .taps(taps_w));
  tapped_delay_line #(.N_TAPS(N), .SEED(11)) u_dp (.clk, .din(wave_p), .taps(taps_p));

  tdc_line #(.N_TAPS(N), .WAVE_UNION(1'b1), .NCAL_LOG2(NL)) dut_w (
    .clk, .rst, .cal_start, .taps(taps_w), .coarse, .cal_busy(busy_w), .cal_done(done_w),
    .raw_hit(), .raw_bin(), .hit_valid(v_w), .hit_ts(ts_w));
  tdc_line #(.N_TAPS(N), .WAVE_UNION(1'b0), .NCAL_LOG2(NL)) dut_p (
    .clk, .rst, .cal_start, .taps(taps_p), .coarse, .cal_busy(busy_p), .cal_done(done_p),
    .raw_hit(), .raw_bin(), .hit_valid(v_p), .hit_ts(ts_p));

  always #(T / 2.0) clk = !clk;
  always #(TCAL / 2.0) cal_clk = !cal_clk;

  always @(posedge clk) begin
    if (v_w) got_w.push_back(ts_w);
    if (v_p) got_p.push_back(ts_p);
    if (busy_w) cal_cycles++;
    if (!rst && ((v_w && busy_w) || (v_p && busy_p))) early++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic evaluate(string name, ts_t got [$]);
    real err, sum2 = 0.0, worst = 0.0;
    check(got.size() == hit_time.size(),
          $sformatf("%s: %0d hits measured of %0d", name, got.size(), hit_time.size()));
    if (got.size() != hit_time.size()) return;
    for (int i = 1; i < got.size(); i++) begin
      err = real'(ts_t'(got[i] - got[0])) * U - (hit_time[i] - hit_time[0]);
      sum2 += err * err;
      if (err > worst || -err > worst) worst = (err > 0) ? err : -err;
      check(err < 40.0 && err > -40.0, $sformatf("%s: hit %0d off by %0f ps", name, i, err));
    end
    $display("%s: rms error %0f ps, worst %0f ps over %0d hits", name,
             $sqrt(sum2 / (got.size() - 1)), worst, got.size());
    check($sqrt(sum2 / (got.size() - 1)) < 15.0, $sformatf("%s: rms error", name));
  endtask

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    cal_sel <= 1'b1;
    @(posedge clk);
    cal_start <= 1'b1;
    @(posedge clk);
    cal_start <= 1'b0;
    wait (done_w && done_p);
    check(cal_cycles <= 512 + (1 << NL) * 15 + 2 * 1030,
          $sformatf("LUT built in %0d cycles", cal_cycles));
    cal_sel <= 1'b0;
    repeat (20) @(posedge clk);
    check(early == 0, "no hits reported while the LUT is being built");
    // Calibration-clock edges after the build are measured like hits; drop them.
    got_w.delete();
    got_p.delete();
    // measurement: hits at random times
    for (int i = 0; i < 400; i++) begin
      #(10000.0 + real'($urandom % 100000) / 7.0);
      hit = 1'b1;
      hit_time.push_back($realtime);
      #5000.0;
      hit = 1'b0;
    end
    repeat (20) @(posedge clk);
    evaluate("wave union", got_w);
    evaluate("plain", got_p);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
