// tb_reg_clock_select: self-checking test of M5. For random CLK, DCLK and
// select patterns each register clock must equal DCLK where its select bit
// is 1 and CLK elsewhere.
module tb_reg_clock_select;
  timeunit 1ps; timeprecision 1fs;
  logic clk, dclk; logic [5:0] use_dclk, ck;
  int checks = 0, failures = 0;

  reg_clock_select #(.NUM_CK(6)) dut (.clk, .dclk, .use_dclk, .ck);

  initial begin
    #1us;  // watchdog: counts as one failure
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 256; n++) begin
      clk = n[0]; dclk = n[1]; use_dclk = 6'($urandom);
      #1;
      for (int i = 0; i < 6; i++) begin
        checks++;
        if (ck[i] !== (use_dclk[i] ? dclk : clk)) begin
          failures++;
          if (failures < 10) $display("FAIL ck[%0d] sel=%b clk=%b dclk=%b", i, use_dclk, clk, dclk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
