`timescale 1ps/1fs
// tb_tdl_encoder: drives the encoder with snapshots of known hits and checks
// the hit flag, the bin id and the coarse count one clock later.
//  Plain mode: a step with front f gives one hit with bin f; the following
//  all-ones snapshots and the falling edge give none.
//  Wave-union mode: a pulse of w taps is seen first half-entered (no hit),
//  then whole with rear r (one hit, bin 2r + w), then further down (no hit).
//  Sometimes the whole pulse appears in one snapshot after an empty one.
//  Plain mode with older ones beyond the first step must still give the
//  position of the first step.
module tb_tdl_encoder;
  import tdc_pkg::*;
  localparam int N = 192;

  logic         clk = 1'b0, rst = 1'b1;
  logic [N-1:0] taps_p = '0, taps_w = '0;
  coarse_t      coarse = '0;
  logic         hit_p, hit_w;
  logic [8:0]   bin_p, bin_w;
  coarse_t      co_p, co_w;
  int           checks = 0, failures = 0;

  // expected results, one entry per cycle, applied one clock later
  bit           exp_hit_p, exp_hit_w;
  int           exp_bin_p, exp_bin_w;
  coarse_t      exp_co;

  tdl_encoder #(.N_TAPS(N), .BIN_BITS(9), .WAVE_UNION(1'b0)) dut_p (
    .clk, .rst, .taps(taps_p), .coarse_in(coarse), .hit(hit_p), .bin(bin_p), .coarse_out(co_p));
  tdl_encoder #(.N_TAPS(N), .BIN_BITS(9), .WAVE_UNION(1'b1)) dut_w (
    .clk, .rst, .taps(taps_w), .coarse_in(coarse), .hit(hit_w), .bin(bin_w), .coarse_out(co_w));

  always #1333.333 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [N-1:0] ones(int lo, int hi);  // taps lo..hi-1 set
    logic [N-1:0] v = '0;
    for (int i = 0; i < N; i++) if (i >= lo && i < hi) v[i] = 1'b1;
    return v;
  endfunction

  // Present one snapshot pair, then check the previous expectation.
  task automatic step(logic [N-1:0] tp, bit hp, int bp, logic [N-1:0] tw, bit hw, int bw);
    taps_p <= tp;
    taps_w <= tw;
    coarse <= coarse + 1'b1;
    @(posedge clk);
    #1;
    check(hit_p == hp, $sformatf("plain hit %0b expected %0b", hit_p, hp));
    if (hp) check(int'(bin_p) == bp, $sformatf("plain bin %0d expected %0d", bin_p, bp));
    check(hit_w == hw, $sformatf("wave-union hit %0b expected %0b", hit_w, hw));
    if (hw) check(int'(bin_w) == bw, $sformatf("wave-union bin %0d expected %0d", bin_w, bw));
    check(co_p == coarse && co_w == coarse, "coarse count of the snapshot");
  endtask

  initial begin
    #50us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int f, r, w, first;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #1;
    for (int n = 0; n < 300; n++) begin
      f = 1 + $urandom % 150;          // plain: front position
      r = 1 + $urandom % 139;             // wave union: rear position when whole
      w = 10 + $urandom % 20;          // pulse width in taps
      first = $urandom % w;            // front position when half-entered
      // idle
      step('0, 0, 0, '0, 0, 0);
      if (n % 4 == 3) begin
        // older signal still further down the chain (short pulse on the
        // trailing-edge line): only the first step counts
        step(ones(0, f) | ones(f + 5 + $urandom % 20, N), 1, f, ones(0, first), 0, 0);
        step('1, 0, 0, ones(r, r + w), 1, 2 * r + w);
      end else if (n % 4 == 0) begin
        // whole pulse enters between two snapshots
        step(ones(0, f), 1, f, ones(r, r + w), 1, 2 * r + w);
      end else begin
        step(ones(0, f), 1, f, ones(0, first), 0, 0);
        step('1, 0, 0, ones(r, r + w), 1, 2 * r + w);
      end
      // pulse further down the chain, plain input stays high
      step('1, 0, 0, ones(r + 145, r + 145 + w), 0, 0);
      // falling edge of the plain input
      step(ones(f, N), 0, 0, '0, 0, 0);
      step('0, 0, 0, '0, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
