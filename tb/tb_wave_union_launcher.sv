`timescale 1ps/1fs
// tb_wave_union_launcher: checks that a rising edge of the hit gives one
// output pulse of the launcher's fixed width, whatever the hit's own width,
// and that the plain launcher passes the hit through.
module tb_wave_union_launcher;
  logic hit = 1'b0;
  logic wave, wave_plain;
  int   checks = 0, failures = 0;
  realtime t_rise, t_fall;
  int   n_rise = 0;

  wave_union_launcher #(.WAVE_UNION(1'b1), .WIDTH_PS(300.0)) dut (.hit, .wave);
  wave_union_launcher #(.WAVE_UNION(1'b0)) dut_plain (.hit, .wave(wave_plain));

  always @(posedge wave) begin t_rise = $realtime; n_rise++; end
  always @(negedge wave) t_fall = $realtime;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    for (int i = 0; i < 20; i++) begin
      automatic realtime t0 = $realtime;
      automatic int width = 50 + $urandom % 5000;   // hit width in ps
      hit = 1'b1;
      #1;
      check(wave_plain == 1'b1, "plain launcher follows the rising hit");
      #(width - 1);
      hit = 1'b0;
      #1;
      check(wave_plain == 1'b0, "plain launcher follows the falling hit");
      #6000;
      check(n_rise == i + 1, "one pulse per hit");
      check(t_rise - t0 < 0.01, "pulse starts with the hit");
      check(t_fall - t_rise > 299.99 && t_fall - t_rise < 300.01,
            $sformatf("pulse width %0f ps", t_fall - t_rise));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
