`timescale 1ps/1fs
// tb_hr_tdc_full: the TDC at its full default size (16 channels, 33 wave-union
// delay lines, 2^16 calibration hits per line, 256-hit L1 buffers) through one
// complete operation: every LUT is built from the 26.4528 MHz calibration
// clock, then each channel gets one pulse of random width at a random time,
// then a common stop. All 32 words (leading and trailing edge of each channel)
// must be read, each within 80 ps of the true stop-to-edge time.
module tb_hr_tdc_full;
  import tdc_pkg::*;
  localparam real T = 1.0e6 / 375.0;
  localparam real TCAL = 1.0e6 / 26.4528;
  localparam real U = T / 4096.0;
  localparam int  N = 16;

  logic        clk = 1'b0, rst = 1'b1, cal_clk = 1'b0, cal_start = 1'b0;
  logic [N-1:0] hit_in = '0;
  logic        stop_in = 1'b0, out_valid, cal_done, busy;
  tdc_word_t   out;
  logic [N-1:0] lost;
  int          checks = 0, failures = 0;
  tdc_word_t   got [$];
  realtime     rise [N], fall [N];
  bit          armed = 0;

  hr_tdc_top dut (.clk, .rst, .cal_clk, .cal_start, .hit_in, .stop_in,
                  .out_valid, .out_ready(1'b1), .out, .cal_done, .busy, .lost);

  always #(T / 2.0) clk = !clk;
  always #(TCAL / 2.0) cal_clk = !cal_clk;
  always @(posedge clk) if (armed && out_valid) got.push_back(out);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t_stop;
    int      seen [N][2];
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    cal_start = 1'b1;
    @(negedge clk);
    cal_start = 1'b0;
    wait (cal_done);
    $display("all 33 LUTs built at %0t", $realtime);
    // let the calibration-clock edges measured after the build leave the
    // 8192-clock window
    repeat (8300) @(negedge clk);
    wait (!busy);
    repeat (20) @(negedge clk);
    armed = 1;
    for (int c = 0; c < N; c++) begin
      fork
        automatic int ch = c;
        begin
          #(real'($urandom % 100000) + 0.5 * real'($urandom % 1000));
          hit_in[ch] = 1'b1;
          rise[ch] = $realtime;
          #(2000.0 + real'($urandom % 40000));
          hit_in[ch] = 1'b0;
          fall[ch] = $realtime;
        end
      join_none
    end
    #200000.0;
    stop_in = 1'b1;
    t_stop = $realtime;
    #10000.0;
    stop_in = 1'b0;
    repeat (20) @(negedge clk);
    wait (!busy);
    repeat (20) @(negedge clk);
    for (int c = 0; c < N; c++) begin
      seen[c][0] = 0;
      seen[c][1] = 0;
    end
    foreach (got[k]) begin
      automatic real dt = real'(got[k].dt) * U;
      automatic real tr = t_stop - (got[k].trailing ? fall[got[k].ch] : rise[got[k].ch]);
      seen[got[k].ch][got[k].trailing]++;
      check(dt - tr < 80.0 && dt - tr > -80.0,
            $sformatf("ch %0d %s: dt %0f ps, true %0f ps", got[k].ch,
                      got[k].trailing ? "trailing" : "leading", dt, tr));
    end
    for (int c = 0; c < N; c++)
      check(seen[c][0] == 1 && seen[c][1] == 1, $sformatf("ch %0d read once per edge", c));
    check(got.size() == 2 * N, $sformatf("%0d words read", got.size()));
    check(lost == '0, "no hit lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
