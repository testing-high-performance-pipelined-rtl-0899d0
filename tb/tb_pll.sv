// tb_pll: self-checking test of the frequency-multiplying PLL model. A
// 100 MHz reference must give ten output pulses per reference period, 1 ns
// apart, the first aligned with the reference edge, once `locked` is high;
// with en low there must be no output.
module tb_pll;
  timeunit 1ps; timeprecision 1fs;
  logic ref_clk = 1'b0, en = 1'b1, out, locked;
  int pulses = 0;
  realtime t_last_out = 0.0, t_ref = 0.0;
  real worst = 0.0;
  int checks = 0, failures = 0;

  pll #(.MULT(10)) dut (.ref_clk, .en, .out, .locked);

  always #5000 ref_clk = ~ref_clk;
  always @(posedge ref_clk) t_ref = $realtime;
  always @(posedge out) begin
    if (locked && pulses > 0) begin
      automatic real per = $realtime - t_last_out;
      if (per - 1000.0 > worst) worst = per - 1000.0;
      if (1000.0 - per > worst) worst = 1000.0 - per;
    end
    t_last_out = $realtime;
    pulses++;
  end

  initial begin
    #10us;  // watchdog: counts as one failure
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (6) @(posedge ref_clk);
    checks++; if (!locked) begin failures++; $display("FAIL not locked"); end
    #1;
    checks++; if (t_last_out != t_ref) begin failures++; $display("FAIL not aligned"); end
    pulses = 0;
    repeat (10) @(posedge ref_clk);
    #1;
    checks++; if (pulses != 100) begin failures++; $display("FAIL %0d pulses in 10 periods", pulses); end
    checks++; if (worst > 0.01) begin failures++; $display("FAIL period error %f ps", worst); end
    en = 1'b0;
    repeat (2) @(posedge ref_clk);
    pulses = 0;
    repeat (3) @(posedge ref_clk);
    checks++; if (pulses != 0 || locked) begin failures++; $display("FAIL output while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
