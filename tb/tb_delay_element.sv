// tb_delay_element: self-checking test of the delay element model. Measures
// rising and falling edge delays at the calibrated control voltages
// (Vn = 611.5 mV, Vp = VDD - Vn: 100 ps), at full drive (Vn = VDD, Vp = 0:
// the 60 ps minimum) and checks that a lower Vn gives a longer delay.
module tb_delay_element;
  timeunit 1ps; timeprecision 1fs;
  logic in = 1'b0, out;
  real vp, vn;
  int checks = 0, failures = 0;

  delay_element dut (.in, .vp, .vn, .out);

  task automatic measure(input logic level, output real d);
    realtime t0;
    in = level; t0 = $realtime;
    @(out);
    d = $realtime - t0;
    checks++;
    if (out !== level) begin failures++; $display("FAIL output level %b", out); end
    #1000;
  endtask

  task automatic near(input string what, input real got, input real want, input real tol);
    checks++;
    if (got < want - tol || got > want + tol) begin
      failures++;
      $display("FAIL %s: %f ps, expected %f", what, got, want);
    end
  endtask

  initial begin
    #1us;  // watchdog: counts as one failure
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    real d_rise, d_fall, d_slow;
    vn = 611.5; vp = 1800.0 - 611.5;
    #1000;
    in = 1'b1; #1000; in = 1'b0; #1000;   // settle the output after time 0
    measure(1'b1, d_rise); near("rise @611.5mV", d_rise, 100.0, 0.01);
    measure(1'b0, d_fall); near("fall @611.5mV", d_fall, 100.0, 0.01);
    vn = 1800.0; vp = 0.0;
    measure(1'b1, d_rise); near("rise @VDD", d_rise, 60.0, 0.1);
    vn = 500.0; vp = 1300.0;
    measure(1'b0, d_slow);
    checks++;
    if (!(d_slow > 110.0)) begin failures++; $display("FAIL delay at 500 mV only %f", d_slow); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
