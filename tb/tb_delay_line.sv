// tb_delay_line: self-checking test of a 10-element delay line at the
// calibrated control voltages: tap k must follow the input k * 100 ps later,
// on both edges.
module tb_delay_line;
  timeunit 1ps; timeprecision 1fs;
  localparam int LEN = 10;
  logic in = 1'b0;
  logic [LEN:1] tap;
  real vp = 1188.5, vn = 611.5;
  realtime t_in, t_tap;
  int checks = 0, failures = 0;

  delay_line #(.LEN(LEN)) dut (.in, .vp, .vn, .tap);

  initial begin
    #1ms;  // watchdog: counts as one failure
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #2000 in = 1'b1; #3000 in = 1'b0; #3000;    // flush initial state
    for (int k = 1; k <= LEN; k++) begin
      for (int e = 0; e < 2; e++) begin
        in = ~in; t_in = $realtime;
        @(tap[k]);
        t_tap = $realtime;
        #3000;
        checks++;
        if (tap[k] !== in || t_tap - t_in < 100.0 * k - 0.05 || t_tap - t_in > 100.0 * k + 0.05) begin
          failures++;
          $display("FAIL tap %0d: level %b delay %f", k, tap[k], t_tap - t_in);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
