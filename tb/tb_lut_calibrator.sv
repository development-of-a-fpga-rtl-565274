`timescale 1ps/1fs
// tb_lut_calibrator: runs the code density calibration on a known set of
// hits and checks every LUT word through the look-up path.
//
// Hits are drawn from an uneven bin distribution (bins 10..309 in use, some
// with zero width), sometimes back to back in the same bin. The expected LUT
// is computed here from the hits sent:
//   LUT[b] = (2 * S[b] + H[b]) * 2^12 / (2 * 2^NCAL_LOG2), or 0 where all hits
//   lie below b,
// with H the histogram and S the number of hits in bins below b. Hits sent
// after the calibration count is reached must not change the result. The
// build must finish within 3 x 512 + 2^NCAL_LOG2 + slack cycles of the last hit.
module tb_lut_calibrator;
  localparam int NL = 12;                 // 4096 calibration hits
  localparam int NCAL = 1 << NL;

  logic       clk = 1'b0, rst = 1'b1, cal_start = 1'b0, hit = 1'b0;
  logic [8:0] bin = '0;
  logic       cal_busy, cal_done, fine_valid;
  logic [11:0] fine;
  int         checks = 0, failures = 0;
  int         hist [512];
  int         weight [512];
  int         expected [512];
  int         total_w;
  int         cycles;

  lut_calibrator #(.BIN_BITS(9), .FINE_BITS(12), .NCAL_LOG2(NL)) dut (
    .clk, .rst, .cal_start, .hit, .bin, .cal_busy, .cal_done, .fine_valid, .fine);

  always #1333.333 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int draw_bin();
    int x = $urandom % total_w;
    for (int b = 0; b < 512; b++) begin
      if (x < weight[b]) return b;
      x -= weight[b];
    end
    return 0;
  endfunction

  initial begin
    #200ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, b, last, gap;
    total_w = 0;
    for (int i = 0; i < 512; i++) begin
      weight[i] = (i >= 10 && i < 310 && (i % 37) != 5) ? 1 + $urandom % 30 : 0;
      total_w += weight[i];
      hist[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check(!cal_done && !cal_busy, "idle without a LUT after reset");
    // A look-up before calibration must give nothing.
    hit <= 1'b1;
    @(posedge clk);
    hit <= 1'b0;
    @(posedge clk);
    check(!fine_valid, "no look-up before calibration");
    cal_start <= 1'b1;
    @(posedge clk);
    cal_start <= 1'b0;
    repeat (520) @(posedge clk);   // clearing the RAM
    check(cal_busy, "busy while calibrating");
    last = 0;
    for (int n = 0; n < NCAL; n++) begin
      // back to back in the same bin now and then
      b = (n % 5 == 1) ? last : draw_bin();
      last = b;
      hist[b]++;
      hit <= 1'b1;
      bin <= 9'(b);
      @(posedge clk);
      gap = ($urandom % 3 == 0) ? $urandom % 4 : 0;
      if (gap > 0) begin
        hit <= 1'b0;
        repeat (gap) @(posedge clk);
      end
    end
    // Extra hits after the count is reached are ignored.
    for (int n = 0; n < 50; n++) begin
      hit <= 1'b1;
      bin <= 9'(20);
      @(posedge clk);
    end
    hit <= 1'b0;
    cycles = 0;
    while (!cal_done && cycles < 5000) begin
      @(posedge clk);
      cycles++;
    end
    check(cal_done && !cal_busy, "calibration finishes");
    check(cycles <= 2 * 512 + 20, $sformatf("integration and normalisation took %0d cycles", cycles));
    // expected LUT
    s = 0;
    for (int i = 0; i < 512; i++) begin
      expected[i] = (s == NCAL) ? 0 : ((2 * s + hist[i]) * 4096) / (2 * NCAL);
      s += hist[i];
    end
    // Look every bin up, back to back.
    // (RAM word and valid flag are registered at the edge that samples bin)
    for (int i = 0; i < 512; i++) begin
      hit <= 1'b1;
      bin <= 9'(i);
      @(posedge clk);
      #1;
      check(fine_valid, "look-up answered");
      check(int'(fine) == expected[i],
            $sformatf("LUT[%0d] = %0d expected %0d", i, fine, expected[i]));
    end
    check(expected[400] == 0 && expected[200] > 1000, "reference sanity");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
