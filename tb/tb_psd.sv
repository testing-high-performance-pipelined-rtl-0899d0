// tb_psd: self-checking test of the phase splitter & delay model at the
// calibrated control voltages. For rising and falling edges of J: U follows
// J at once, B follows J 50 ps later and A 100 ps later (A lags B by half an
// element delay), all with J's polarity.
module tb_psd;
  timeunit 1ps; timeprecision 1fs;
  logic j = 1'b0, u, a, b;
  real vp = 1188.5, vn = 611.5;
  realtime t_a, t_b, t_j;
  int checks = 0, failures = 0;

  psd dut (.j, .vp, .vn, .u, .a, .b);

  always @(posedge a or negedge a) t_a = $realtime;
  always @(posedge b or negedge b) t_b = $realtime;

  task automatic near(input string what, input real got, input real want);
    checks++;
    if (got < want - 0.05 || got > want + 0.05) begin
      failures++; $display("FAIL %s: %f ps, expected %f", what, got, want);
    end
  endtask

  initial begin
    #1us;  // watchdog: counts as one failure
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1000 j = 1'b1; #1000 j = 1'b0; #1000;
    for (int e = 0; e < 4; e++) begin
      j = ~j; t_j = $realtime;
      #1;
      checks++; if (u !== j) begin failures++; $display("FAIL U"); end
      #999;
      checks++; if (a !== j || b !== j) begin failures++; $display("FAIL polarity a=%b b=%b j=%b", a, b, j); end
      near("J->B", t_b - t_j, 50.0);
      near("J->A", t_a - t_j, 100.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
