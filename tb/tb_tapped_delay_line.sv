`timescale 1ps/1fs
// tb_tapped_delay_line: checks the delay-line model. A step placed a known
// time before a sampling edge must show up as a thermometer code (1..1 0..0)
// whose length grows with that time; about 145 taps must span one 2.667 ns
// clock period (mean bin 15-25 ps); a 300 ps pulse must show as 0..0 1..1 0..0
// with about 15 set taps; and a steady input must give a uniform snapshot.
module tb_tapped_delay_line;
  localparam int N = 192;
  localparam real T = 2666.667;

  logic         clk = 1'b0, din = 1'b0;
  logic [N-1:0] taps;
  int           checks = 0, failures = 0;
  int           prev_front;
  int           front_one_period;

  tapped_delay_line #(.N_TAPS(N), .SEED(7)) dut (.clk, .din, .taps);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Number of leading ones and whether the code is a clean thermometer.
  function automatic int front_of(logic [N-1:0] t);
    int f = 0;
    while (f < N && t[f]) f++;
    return f;
  endfunction
  function automatic bit is_thermo(logic [N-1:0] t, int f);
    for (int i = f; i < N; i++) if (t[i]) return 1'b0;
    return 1'b1;
  endfunction

  // Place an edge `lead` ps before a clock edge and return the snapshot.
  task automatic sample(input real lead, input bit pulse, output logic [N-1:0] snap);
    din = 1'b0;
    #10000;
    #(20000.0 - lead);
    din = 1'b1;
    if (pulse) begin
      #300.0;
      din = 1'b0;
      #(lead - 300.0);
    end else begin
      #(lead);
    end
    clk = 1'b1;
    #1;
    snap = taps;
    #1000;
    clk = 1'b0;
    din = 1'b0;
    #10000;
  endtask

  initial begin
    #100ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] snap;
    int f, ones, lo;
    prev_front = 0;
    // Sweep the edge over one clock period.
    for (real lead = 0.0; lead <= T; lead += 7.0) begin
      sample(lead, 1'b0, snap);
      f = front_of(snap);
      check(is_thermo(snap, f), $sformatf("thermometer code at %0f ps", lead));
      check(f >= prev_front, $sformatf("front moves forward with time (%0d < %0d)", f, prev_front));
      prev_front = f;
    end
    front_one_period = prev_front;
    check(front_one_period > 110 && front_one_period < 180,
          $sformatf("%0d taps span one clock period", front_one_period));
    // A 300 ps pulse that entered 1500 ps before the edge.
    sample(1500.0, 1'b1, snap);
    ones = $countones(snap);
    lo = 0;
    while (lo < N && !snap[lo]) lo++;
    check(!snap[0] && lo > 0, "pulse rear has entered the chain");
    check(ones > 8 && ones < 30, $sformatf("pulse covers %0d taps", ones));
    check(front_of(snap >> lo) == ones, "pulse is one block of ones");
    // Steady high input.
    din = 1'b1;
    #10000;
    clk = 1'b1;
    #1;
    check(taps == '1, "steady high gives all ones");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
