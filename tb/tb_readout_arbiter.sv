`timescale 1ps/1fs
// tb_readout_arbiter: random producers on 5 channels feed the arbiter while
// the consumer stalls at random. Every word must come out once, tagged with
// its channel and in its channel's order. With all channels busy the grants
// must rotate: no channel served twice within 5 consecutive words. A steady
// consumer must receive one word per clock.
module tb_readout_arbiter;
  import tdc_pkg::*;
  localparam int N = 5;

  logic               clk = 1'b0, rst = 1'b1;
  logic    [N-1:0]    in_valid, in_ready;
  l1_hit_t [N-1:0]    in_data;
  logic               out_valid, out_ready;
  tdc_word_t          out;
  int                 checks = 0, failures = 0;
  l1_hit_t            pending [N][$];
  int                 sent = 0, received = 0;
  bit                 stall_en = 1, saturate = 0;
  int                 last_seen [N];
  int                 word_no = 0;
  int                 busy_cycles = 0, busy_words = 0;

  readout_arbiter #(.N_CH(N)) dut (.clk, .rst, .in_valid, .in_ready, .in_data,
                                   .out_valid, .out_ready, .out);

  always #1333.333 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always_comb
    for (int c = 0; c < N; c++) begin
      in_valid[c] = pending[c].size() > 0;
      in_data[c]  = in_valid[c] ? pending[c][0] : '0;
    end

  always @(posedge clk) begin
    if (!rst) begin
      for (int c = 0; c < N; c++)
        if (in_valid[c] && in_ready[c]) void'(pending[c].pop_front());
      if (out_valid && out_ready) begin
        received++;
        word_no++;
        check(out.dt[TS_BITS-1:20] == 6'(out.ch), "word carries its channel's tag");
        check(out.dt[19:0] == 20'(last_seen[out.ch] + 1), "channel order kept");
        last_seen[out.ch] = int'(out.dt[19:0]);
        if (saturate) begin
          busy_words++;
        end
      end
      if (saturate) busy_cycles++;
    end
  end

  always @(negedge clk) out_ready = stall_en ? ($urandom % 2 == 0) : 1'b1;

  int next_id [N];
  task automatic produce(int c);
    next_id[c]++;
    pending[c].push_back('{trailing: 1'(next_id[c]), ts: {6'(c), 20'(next_id[c])}});
    sent++;
  endtask

  initial begin
    #10ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < N; c++) begin
      last_seen[c] = 0;
      next_id[c] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      for (int c = 0; c < N; c++) if ($urandom % 12 == 0) produce(c);
    end
    repeat (2000) @(negedge clk);
    check(received == sent, $sformatf("%0d of %0d words received", received, sent));
    // all channels loaded, consumer always ready
    stall_en = 0;
    for (int c = 0; c < N; c++) repeat (40) produce(c);
    @(negedge clk);
    saturate = 1;
    repeat (100) @(negedge clk);
    saturate = 0;
    check(busy_words >= 99, $sformatf("%0d words in 100 clocks", busy_words));
    repeat (200) @(negedge clk);
    check(received == sent, "all words received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Fairness: with every channel requesting, N consecutive grants go to N
  // different channels.
  int window_ch [$];
  always @(posedge clk) begin
    if (!rst && saturate && out_valid && out_ready) begin
      window_ch.push_back(int'(out.ch));
      if (window_ch.size() > N) void'(window_ch.pop_front());
      if (window_ch.size() == N) begin
        automatic bit dup = 0;
        for (int a = 0; a < N; a++)
          for (int b = a + 1; b < N; b++) if (window_ch[a] == window_ch[b]) dup = 1;
        check(!dup, "round-robin order");
      end
    end
  end
endmodule
