`timescale 1ps/1fs
// tb_coarse_counter: checks that the coarse counter counts clock periods,
// holds when disabled, clears on reset and wraps after 2^14 periods.
module tb_coarse_counter;
  import tdc_pkg::*;

  logic    clk = 1'b0, rst = 1'b1, en = 1'b1;
  coarse_t count;
  int      checks = 0, failures = 0;
  int unsigned expected;

  coarse_counter dut (.clk, .rst, .en, .count);

  always #1333.333 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #1;
    check(count == 1, "counting starts at the first edge after reset release");
    expected = 1;
    // Run past one wrap-around.
    for (int i = 0; i < 20000; i++) begin
      en <= ($urandom % 8) != 0;
      @(posedge clk);
      if (en) expected = (expected + 1) % 16384;
      #1;
      if (i % 97 == 0 || expected < 3) check(count == coarse_t'(expected), $sformatf("count %0d expected %0d", count, expected));
    end
    check(expected < 20000, "wrapped");
    rst <= 1'b1;
    @(posedge clk);
    #1;
    check(count == 0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
