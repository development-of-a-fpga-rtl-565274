`timescale 1ps/1fs
// tb_tdc_channel: one channel (leading-edge and trailing-edge lines with
// wave-union launchers, L1 buffer) from calibration to readout.
//
// After both LUTs are built from the 26.4528 MHz calibration clock, pulses of
// random width (2-30 ns) are sent at random times, a few per event. Each event
// is read with a trigger whose stop time is the coarse count at the trigger,
// with a 100-clock window so that earlier events stay out of it.
// Checked: every pulse gives one leading and one trailing word; the measured
// pulse width (leading dt - trailing dt) is within 60 ps of the true width; the
// gaps between pulses of an event are within 40 ps of the true gaps.
module tb_tdc_channel;
  import tdc_pkg::*;
  localparam real T = 1.0e6 / 375.0;
  localparam real TCAL = 1.0e6 / 26.4528;
  localparam real U = T / 4096.0;

  logic    clk = 1'b0, rst = 1'b1, cal_clk = 1'b0, cal_sel = 1'b0, cal_start = 1'b0;
  logic    hit_in = 1'b0, trig = 1'b0, out_ready = 1'b1;
  ts_t     trig_ts = '0;
  coarse_t coarse;
  logic    out_valid, busy, done, lost, cal_busy, cal_done;
  l1_hit_t out;
  int      checks = 0, failures = 0;
  l1_hit_t got [$];

  coarse_counter u_cc (.clk, .rst, .en(1'b1), .count(coarse));

  tdc_channel #(.NCAL_LOG2(13), .WINDOW_CYCLES(100), .SEED(3)) dut (
    .clk, .rst, .hit_in, .cal_clk, .cal_sel, .cal_start, .coarse, .trig, .trig_ts,
    .out_valid, .out_ready, .out, .busy, .done, .lost, .cal_busy, .cal_done);

  always #(T / 2.0) clk = !clk;
  always #(TCAL / 2.0) cal_clk = !cal_clk;
  always @(posedge clk) if (!rst && out_valid && out_ready) got.push_back(out);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real ps(ts_t v);
    return real'(v) * U;
  endfunction

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t_rise [4], width [4];
    int      n;
    real     lead_dt [4], trail_dt [4];
    int      nl, nt;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    cal_sel = 1'b1;
    cal_start = 1'b1;
    @(negedge clk);
    cal_start = 1'b0;
    wait (cal_done);
    @(negedge clk);
    cal_sel = 1'b0;
    repeat (100) @(negedge clk);
    for (int ev = 0; ev < 30; ev++) begin
      repeat (150) @(negedge clk);
      n = 1 + $urandom % 4;
      for (int p = 0; p < n; p++) begin
        #(5000.0 + real'($urandom % 40000) / 3.0);
        width[p] = 2000.0 + real'($urandom % 28000);
        hit_in = 1'b1;
        t_rise[p] = $realtime;
        #(width[p]);
        hit_in = 1'b0;
      end
      repeat (10) @(negedge clk);
      got.delete();
      trig = 1'b1;
      trig_ts = {coarse, 12'd0};
      @(negedge clk);
      trig = 1'b0;
      wait (done);
      repeat (3) @(negedge clk);
      // newest first: trailing and leading words of each pulse
      nl = 0;
      nt = 0;
      foreach (got[i]) begin
        if (got[i].trailing) begin
          if (nt < 4) trail_dt[n - 1 - nt] = ps(got[i].ts);
          nt++;
        end else begin
          if (nl < 4) lead_dt[n - 1 - nl] = ps(got[i].ts);
          nl++;
        end
      end
      check(nl == n && nt == n, $sformatf("event %0d: %0d/%0d words for %0d pulses", ev, nl, nt, n));
      if (nl == n && nt == n)
        for (int p = 0; p < n; p++) begin
          check((lead_dt[p] - trail_dt[p]) - width[p] < 60.0 && (lead_dt[p] - trail_dt[p]) - width[p] > -60.0,
                $sformatf("event %0d pulse %0d: width %0f ps measured, %0f ps true",
                          ev, p, lead_dt[p] - trail_dt[p], width[p]));
          if (p > 0)
            check((lead_dt[p-1] - lead_dt[p]) - (t_rise[p] - t_rise[p-1]) < 40.0 &&
                  (lead_dt[p-1] - lead_dt[p]) - (t_rise[p] - t_rise[p-1]) > -40.0,
                  $sformatf("event %0d: gap between pulses %0d and %0d", ev, p - 1, p));
        end
    end
    check(!lost, "no hit lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
