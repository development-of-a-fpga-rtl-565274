`timescale 1ps/1fs
// tb_l1_buffer: checks the multi-hit buffer against a reference list of all
// hits written.
//
// Leading and trailing hits (sometimes both in one clock) are written with
// rising timestamps. A trigger with a stop time then must return, newest
// first, exactly the hits of the last 256 written that lie between
// WINDOW_CYCLES clocks before the stop and the stop, with {edge, stop - hit};
// hits up to 64 clocks later than the stop are skipped. After a quiet time
// longer than the window the old hits must not come back, even when the
// timestamps have wrapped around (event 4). Tested: an event with hits on both
// sides of the stop, an event after more than 256 hits (overwriting), hits
// written while a search runs (no dead time), a trigger during a search
// (ignored), a stalled output, and a burst of more hits than the merge queue
// can hold (sets `lost`).
module tb_l1_buffer;
  import tdc_pkg::*;
  localparam int WIN = 2000;                 // window in clocks
  localparam ts_t WIN_TS = ts_t'(WIN) << 12;
  localparam ts_t LATE_TS = ts_t'(0) - (ts_t'(64) << 12);

  logic    clk = 1'b0, rst = 1'b1;
  logic    lead_valid = 0, trail_valid = 0, trig = 0, out_ready = 1;
  ts_t     lead_ts = '0, trail_ts = '0, trig_ts = '0;
  logic    out_valid, busy, done, lost;
  l1_hit_t out;
  int      checks = 0, failures = 0;
  l1_hit_t written [$];
  l1_hit_t expect_q [$];
  l1_hit_t got [$];
  ts_t     now_ts = '0;
  bit      stall_en = 0;
  int      n_events = 0;

  l1_buffer #(.DEPTH(256), .WINDOW_CYCLES(WIN)) dut (
    .clk, .rst, .lead_valid, .lead_ts, .trail_valid, .trail_ts, .trig, .trig_ts,
    .out_valid, .out_ready, .out, .busy, .done, .lost);

  always #1333.333 clk = !clk;

  always @(posedge clk) begin
    now_ts <= now_ts + 26'd4096;
    if (!rst && out_valid && out_ready) got.push_back(out);
  end
  always @(negedge clk) out_ready = stall_en ? ($urandom % 3 == 0) : 1'b1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One clock of input; lead/trail flags select which lines hit.
  // Inputs change at the falling edge, away from the sampling edge.
  task automatic write_cycle(bit l, bit t);
    @(negedge clk);
    lead_valid  = l;
    trail_valid = t;
    lead_ts     = now_ts - ts_t'($urandom % 4096);
    trail_ts    = now_ts - ts_t'($urandom % 4096);
    if (l) written.push_back('{trailing: 1'b0, ts: lead_ts});
    if (t) written.push_back('{trailing: 1'b1, ts: trail_ts});
    @(posedge clk);
    #1;
    lead_valid  = 1'b0;
    trail_valid = 1'b0;
  endtask

  task automatic idle(int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic hits(int n, int max_gap);
    for (int i = 0; i < n; i++) begin
      automatic int r = $urandom % 4;
      write_cycle(r != 1, r != 0);
      idle(1 + $urandom % max_gap);   // at most two hits per two clocks
    end
  endtask

  // Reference result for a stop at `s`, over the last 256 hits written.
  task automatic build_expect(ts_t s);
    ts_t dt;
    expect_q.delete();
    for (int i = written.size() - 1; i >= 0 && i >= written.size() - 256; i--) begin
      dt = s - written[i].ts;
      if (dt >= LATE_TS) continue;          // up to 64 clocks after the stop
      if (dt >= WIN_TS) break;
      expect_q.push_back('{trailing: written[i].trailing, ts: dt});
    end
  endtask

  task automatic fire(ts_t s);
    @(negedge clk);
    trig    = 1'b1;
    trig_ts = s;
    @(posedge clk);
    #1;
    trig = 1'b0;
  endtask

  task automatic compare(string name);
    int cyc = 0;
    while (!done && cyc < 20000) begin
      @(posedge clk);
      #1;
      cyc++;
    end
    n_events++;
    check(got.size() == expect_q.size(),
          $sformatf("%s: %0d words read, %0d expected", name, got.size(), expect_q.size()));
    for (int i = 0; i < got.size() && i < expect_q.size(); i++)
      check(got[i] == expect_q[i], $sformatf("%s: word %0d differs: %h vs %h", name, i, got[i], expect_q[i]));
    got.delete();
  endtask

  initial begin
    #50ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ts_t s;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // 1: hits on both sides of the stop, some outside the window
    hits(60, 60);
    s = now_ts - 26'd80000;              // stop about 20 clocks ago
    hits(6, 3);
    idle(8);
    build_expect(s);
    check(expect_q.size() > 10, "event 1 has hits in the window");
    fire(s);
    compare("event 1");
    // 2: more than 256 hits, all in the window: the newest 256 come back
    hits(320, 3);
    idle(8);
    s = now_ts;
    build_expect(s);
    check(expect_q.size() == 256, "event 2 expects a full buffer");
    stall_en = 1;
    fire(s);
    compare("event 2, stalled output");
    stall_en = 0;
    check(!lost, "no hit lost so far");
    // 3: the old hits fall out of the window; a few new ones, then a stop
    // while hits keep arriving (later than the stop) and a second trigger
    idle(WIN + 10);
    hits(12, 2);
    idle(6);
    s = now_ts;
    build_expect(s);
    check(expect_q.size() >= 12, "event 3 has its hits");
    fire(s);
    for (int i = 0; i < 20; i++) begin
      write_cycle(1'b1, 1'b0);
      if (i == 2) fire(now_ts);            // ignored: search running
    end
    compare("event 3, writes during the search");
    check(!lost, "no hit lost in event 3");
    idle(10);
    check(!busy && got.size() == 0, "the second trigger was ignored");
    // 4: quiet for more than a timestamp range (16384 clocks), then a stop:
    // the old hits now look young again but must not be read
    idle(17000);
    s = now_ts;
    build_expect(s);
    check(expect_q.size() > 0, "event 4: wrapped timestamps would alias");
    expect_q.delete();
    fire(s);
    compare("event 4, after the timestamps wrapped");
    // 5: burst of two hits per clock overflows the merge queue
    for (int i = 0; i < 12; i++) write_cycle(1'b1, 1'b1);
    idle(4);
    check(lost, "overflow of the merge queue is flagged");
    @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    check(!lost && !busy, "reset clears the flags");
    check(n_events == 4, "four events read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
