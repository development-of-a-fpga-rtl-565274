`timescale 1ps/1fs
// tb_stop_resolution: time difference between a hit and the common stop, the
// measurement used to judge the TDC's resolution.
//
// Two one-channel TDCs, one with wave-union launchers and one plain, are
// calibrated with the default 2^16 hits per line. Then 150 events are sent for
// each of two hit-to-stop delays, 1028 ns and 6002 ns: a hit, and the stop
// exactly that long after it, at a random phase of the clock. The spread (sigma)
// of the measured stop - hit must stay below 20 ps, which is the
// single-channel resolution the design aims at (20 ps per channel). The mean
// must be within 100 ps of the true delay (the lines' fixed offsets differ).
// Mean and sigma are printed for each delay and mode.
module tb_stop_resolution;
  import tdc_pkg::*;
  localparam real T = 1.0e6 / 375.0;
  localparam real TCAL = 1.0e6 / 26.4528;
  localparam real U = T / 4096.0;
  localparam int  NEV = 150;

  logic      clk = 1'b0, rst = 1'b1, cal_clk = 1'b0, cal_start = 1'b0;
  logic      hit = 1'b0, stop = 1'b0;
  logic      ov_w, ov_p, cd_w, cd_p, busy_w, busy_p;
  tdc_word_t o_w, o_p;
  logic      lost_w, lost_p;
  int        checks = 0, failures = 0;
  real       dt_w [$], dt_p [$];
  bit        armed = 0;

  hr_tdc_top #(.N_CH(1), .WAVE_UNION(1'b1)) dut_w (
    .clk, .rst, .cal_clk, .cal_start, .hit_in(hit), .stop_in(stop),
    .out_valid(ov_w), .out_ready(1'b1), .out(o_w), .cal_done(cd_w), .busy(busy_w), .lost(lost_w));
  hr_tdc_top #(.N_CH(1), .WAVE_UNION(1'b0)) dut_p (
    .clk, .rst, .cal_clk, .cal_start, .hit_in(hit), .stop_in(stop),
    .out_valid(ov_p), .out_ready(1'b1), .out(o_p), .cal_done(cd_p), .busy(busy_p), .lost(lost_p));

  always #(T / 2.0) clk = !clk;
  always #(TCAL / 2.0) cal_clk = !cal_clk;

  always @(posedge clk) if (armed) begin
    if (ov_w && !o_w.trailing) dt_w.push_back(real'(o_w.dt) * U);
    if (ov_p && !o_p.trailing) dt_p.push_back(real'(o_p.dt) * U);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic judge(string name, real d [$], real delay);
    real m = 0.0, v = 0.0, sigma;
    check(d.size() == NEV, $sformatf("%s: %0d of %0d events measured", name, d.size(), NEV));
    if (d.size() < 2) return;
    foreach (d[i]) m += d[i];
    m /= d.size();
    foreach (d[i]) v += (d[i] - m) * (d[i] - m);
    sigma = $sqrt(v / (d.size() - 1));
    $display("%s, delay %0.0f ns: mean %0.1f ps, sigma %0.2f ps", name, delay / 1000.0, m, sigma);
    check(sigma < 20.0, $sformatf("%s: sigma %0f ps", name, sigma));
    check(m - delay < 100.0 && m - delay > -100.0, $sformatf("%s: mean %0f ps", name, m));
  endtask

  initial begin
    #40ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real delays [2] = '{1028000.0, 6002000.0};
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    cal_start = 1'b1;
    @(negedge clk);
    cal_start = 1'b0;
    wait (cd_w && cd_p);
    repeat (8300) @(negedge clk);
    wait (!busy_w && !busy_p);
    armed = 1;
    foreach (delays[k]) begin
      dt_w.delete();
      dt_p.delete();
      for (int e = 0; e < NEV; e++) begin
        #(real'($urandom % 2667) + real'($urandom % 1000) / 1000.0);
        hit = 1'b1;
        #20000.0;
        hit = 1'b0;
        #(delays[k] - 20000.0);
        stop = 1'b1;
        #20000.0;
        stop = 1'b0;
        repeat (30) @(negedge clk);
        wait (!busy_w && !busy_p);
        repeat (8200) @(negedge clk);    // previous hit leaves the window
      end
      judge("wave union", dt_w, delays[k]);
      judge("plain", dt_p, delays[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
