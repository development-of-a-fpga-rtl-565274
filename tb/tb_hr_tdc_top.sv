`timescale 1ps/1fs
// tb_hr_tdc_top: end-to-end test of the TDC: calibration, hits on several
// channels, common stop, L1 search and readout.
//
// Two TDCs run on the same inputs: one with wave-union launchers (4 channels)
// and one plain (2 channels). Reduced sizes keep the run short: 2^12
// calibration hits per line, a 32-hit L1 buffer and a 300-clock window.
// Each event sends pulses of random width on random channels, then a stop.
// Every word read must belong to a pulse of the event: its leading (trailing)
// dt must be within 80 ps of stop time minus rise (fall) time, and every
// pulse must be read, except where the buffer overflowed (then the newest 32
// hits of that channel). The mechanisms are counted and each must occur:
// LUT build, wave-union and plain measurement, leading and trailing edges,
// overwriting a full L1 buffer, skipping a hit later than the stop, ending a
// search at the window, ignoring a stop during a search, and two channels
// competing for the readout.
module tb_hr_tdc_top;
  import tdc_pkg::*;
  localparam real T = 1.0e6 / 375.0;
  localparam real TCAL = 1.0e6 / 26.4528;
  localparam real U = T / 4096.0;
  localparam int  NW = 4, NP = 2, DEPTH = 32, WIN = 300;

  logic            clk = 1'b0, rst = 1'b1, cal_clk = 1'b0, cal_start = 1'b0;
  logic [NW-1:0]   hit_in = '0;
  logic            stop_in = 1'b0;
  logic            ov_w, ov_p, cd_w, cd_p, busy_w, busy_p;
  tdc_word_t       o_w, o_p;
  logic [NW-1:0]   lost_w;
  logic [NP-1:0]   lost_p;
  int              checks = 0, failures = 0;
  tdc_word_t       got_w [$], got_p [$];

  // mechanism counters
  int n_cal = 0, n_wu = 0, n_plain = 0, n_lead = 0, n_trail = 0, n_overwrite = 0;
  int n_skip = 0, n_window_end = 0, n_ignored = 0, n_contend = 0;

  hr_tdc_top #(.N_CH(NW), .WAVE_UNION(1'b1), .NCAL_LOG2(12), .DEPTH(DEPTH), .WINDOW_CYCLES(WIN)) dut_w (
    .clk, .rst, .cal_clk, .cal_start, .hit_in, .stop_in,
    .out_valid(ov_w), .out_ready(1'b1), .out(o_w), .cal_done(cd_w), .busy(busy_w), .lost(lost_w));
  hr_tdc_top #(.N_CH(NP), .WAVE_UNION(1'b0), .NCAL_LOG2(12), .DEPTH(DEPTH), .WINDOW_CYCLES(WIN)) dut_p (
    .clk, .rst, .cal_clk, .cal_start, .hit_in(hit_in[NP-1:0]), .stop_in,
    .out_valid(ov_p), .out_ready(1'b1), .out(o_p), .cal_done(cd_p), .busy(busy_p), .lost(lost_p));

  always #(T / 2.0) clk = !clk;
  always #(TCAL / 2.0) cal_clk = !cal_clk;

  bit armed = 0;
  always @(posedge clk) if (!rst && armed) begin
    if (ov_w) got_w.push_back(o_w);
    if (ov_p) got_p.push_back(o_p);
    if (dut_w.stop_valid && dut_w.busy) n_ignored++;
    if ($countones(dut_w.ch_valid) > 1) n_contend++;
  end

  // L1 search outcomes, probed inside each channel's buffer
  for (genvar c = 0; c < NW; c++) begin : g_probe
    always @(posedge clk) if (!rst && armed && dut_w.g_ch[c].u_ch.u_l1.st == 3'd3) begin
      if (dut_w.g_ch[c].u_ch.u_l1.dt >= ts_t'(0) - (ts_t'(64) << 12)) n_skip++;
      else if (dut_w.g_ch[c].u_ch.u_l1.dt >= (ts_t'(WIN) << 12)) n_window_end++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // pulses of the current event
  typedef struct { int ch; realtime rise; realtime fall; } pulse_t;
  pulse_t pulses [$];

  task automatic pulse(int ch, realtime width);
    pulse_t p;
    p.ch = ch;
    hit_in[ch] = 1'b1;
    p.rise = $realtime;
    fork
      begin
        #(width);
        hit_in[ch] = 1'b0;
      end
    join_none
    p.fall = p.rise + width;
    pulses.push_back(p);
  endtask

  // Check the words of one TDC against the pulses; returns nothing.
  task automatic judge(string name, tdc_word_t got [$], int nch, realtime t_stop);
    int expect_n [8];
    int seen_n [8];
    real dt, best;
    for (int c = 0; c < 8; c++) begin
      expect_n[c] = 0;
      seen_n[c] = 0;
    end
    foreach (pulses[i]) if (pulses[i].ch < nch && pulses[i].rise < t_stop) begin
      expect_n[pulses[i].ch]++;
      if (pulses[i].fall < t_stop) expect_n[pulses[i].ch]++;
    end
    foreach (got[k]) begin
      dt = real'(got[k].dt) * U;
      best = 1.0e9;
      seen_n[got[k].ch]++;
      if (got[k].trailing) n_trail++; else n_lead++;
      foreach (pulses[i]) if (pulses[i].ch == int'(got[k].ch)) begin
        automatic real e = (t_stop - (got[k].trailing ? pulses[i].fall : pulses[i].rise)) - dt;
        if (e < 0) e = -e;
        if (e < best) best = e;
      end
      check(best < 80.0, $sformatf("%s: word ch %0d %s dt %0f ps matches no edge (%0f)",
                                   name, got[k].ch, got[k].trailing ? "trail" : "lead", dt, best));
    end
    for (int c = 0; c < nch; c++) begin
      if (expect_n[c] > DEPTH) begin
        n_overwrite++;
        check(seen_n[c] == DEPTH, $sformatf("%s: ch %0d overflowed, %0d words", name, c, seen_n[c]));
      end else
        check(seen_n[c] == expect_n[c],
              $sformatf("%s: ch %0d: %0d words, %0d expected", name, c, seen_n[c], expect_n[c]));
    end
  endtask

  initial begin
    #40ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t_stop;
    int      kind;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    cal_start = 1'b1;
    @(negedge clk);
    cal_start = 1'b0;
    wait (cd_w && cd_p);
    n_cal++;
    repeat (2 * WIN) @(negedge clk);      // edges of the calibration clock age out
    wait (!busy_w && !busy_p);
    repeat (50) @(negedge clk);
    armed = 1;
    for (int ev = 0; ev < 24; ev++) begin
      kind = ev % 4;
      pulses.delete();
      got_w.delete();
      got_p.delete();
      #(real'($urandom % 3000));
      if (kind == 3) begin
        // burst on channel 0: more hits than the buffer holds
        for (int i = 0; i < 25; i++) begin
          pulse(0, 3000.0 + real'($urandom % 2000));
          #(9000.0 + real'($urandom % 3000));
        end
      end else begin
        if (kind == 2) begin
          // channel 2: an old hit outside the window (300 clocks = 800 ns),
          // then one inside it; the search ends at the old hit
          hit_in[2] = 1'b1;
          #5000.0;
          hit_in[2] = 1'b0;
          #(500000.0);
          pulse(2, 3000.0);
          #(300000.0);
        end
        for (int i = 0; i < 2 + $urandom % 5; i++) begin
          // a channel gets its next pulse only after the previous one ended
          pulse($urandom % NW, 2000.0 + real'($urandom % 12000));
          #(16000.0 + real'($urandom % 20000));
        end
      end
      #(30000.0);
      stop_in = 1'b1;
      t_stop = $realtime;
      if (kind == 1) begin
        // a hit right after the stop, and a second stop during the search
        #2000.0;
        hit_in[1] = 1'b1;
        #3000.0;
        hit_in[1] = 1'b0;
        #5000.0;
        stop_in = 1'b0;
        #5000.0;
        stop_in = 1'b1;
        #5000.0;
        stop_in = 1'b0;
      end else begin
        #10000.0;
        stop_in = 1'b0;
      end
      repeat (20) @(negedge clk);
      wait (!busy_w && !busy_p);
      repeat (40) @(negedge clk);
      judge("wave union", got_w, NW, t_stop);
      judge("plain", got_p, NP, t_stop);
      if (got_w.size() > 0) n_wu++;
      if (got_p.size() > 0) n_plain++;
      repeat (WIN + 20) @(negedge clk);   // let this event leave the window
    end
    check(lost_w == '0 && lost_p == '0, "no hit lost");
    $display("mechanisms: calibration %0d, wave-union events %0d, plain events %0d, leading %0d, trailing %0d",
             n_cal, n_wu, n_plain, n_lead, n_trail);
    $display("            overwrite %0d, skip after stop %0d, window end %0d, stop ignored %0d, readout contention %0d",
             n_overwrite, n_skip, n_window_end, n_ignored, n_contend);
    check(n_cal > 0, "LUT build happened");
    check(n_wu > 0, "wave-union measurement happened");
    check(n_plain > 0, "plain measurement happened");
    check(n_lead > 0 && n_trail > 0, "leading and trailing edges measured");
    check(n_overwrite > 0, "full L1 buffer overwritten");
    check(n_skip > 0, "hit later than the stop skipped");
    check(n_window_end > 0, "search ended at the window");
    check(n_ignored > 0, "stop during a search ignored");
    check(n_contend > 0, "channels competed for the readout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
