// tb_ctc_control: self-checking test of the mode decoder. For every mode,
// stage, delay code and self-test step it compares the multiplexer selects
// with a table written out here from the routing each mode requires:
// normal mode puts IPCLK on every register, DUT test mode puts DCLK on
// CK(stage+1) only, the self-test steps close the DLL on (C,H), (B,G),
// (A,E), (A,F), (B,E) and (D,I) and route HFCLK to J.
module tb_ctc_control;
  import ctc_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  mode_e mode; logic [2:0] stage; logic [3:0] td_code; ctc_step_e step;
  mux_sel_t sel;
  int checks = 0, failures = 0;

  ctc_control dut (.mode, .stage, .td_code, .step, .sel);

  task automatic expect_sel(input string what, input logic m1, input logic [1:0] m3, input logic [2:0] m4,
                            input logic [5:0] m5, input logic en, input logic [3:0] m2);
    checks++;
    if (sel.m1 !== m1 || sel.m3 !== m3 || sel.m4 !== m4 || sel.m5_dclk !== m5 ||
        sel.analog_en !== en || sel.m2 !== m2) begin
      failures++;
      if (failures < 10) $display("FAIL %s stage=%0d: got %p", what, stage, sel);
    end
  endtask

  initial begin
    #1us;  // watchdog: counts as one failure
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    step = STEP_DL0;
    for (int s = 0; s < 5; s++) begin
      stage = 3'(s); td_code = 4'($urandom);
      mode = MODE_NORMAL;   #1; expect_sel("normal", 1'b0, 2'd2, 3'd3, 6'b000000, 1'b0, td_code);
      mode = MODE_DUT_TEST; #1; expect_sel("dut",    1'b0, 2'd2, 3'd3, 6'(1 << (s + 1)), 1'b1, td_code);
      mode = MODE_CTC_TEST;
      step = STEP_DL0;   #1; expect_sel("dl0",  1'b1, 2'd2, 3'd3, 6'b0, 1'b1, td_code);
      step = STEP_DL1;   #1; expect_sel("dl1",  1'b1, 2'd1, 3'd2, 6'b0, 1'b1, td_code);
      step = STEP_DL2;   #1; expect_sel("dl2",  1'b1, 2'd0, 3'd0, 6'b0, 1'b1, td_code);
      step = STEP_PSD_A; #1; expect_sel("psda", 1'b1, 2'd0, 3'd1, 6'b0, 1'b1, td_code);
      step = STEP_PSD_B; #1; expect_sel("psdb", 1'b1, 2'd1, 3'd0, 6'b0, 1'b1, td_code);
      step = STEP_M5;    #1; expect_sel("m5",   1'b1, 2'd3, 3'd4, 6'(1 << (s + 1)), 1'b1, 4'd15);
      checks++;
      if (sel.m6 !== 3'(s) || sel.m7 !== 3'(s + 1)) begin
        failures++; $display("FAIL m6/m7 stage=%0d: %0d %0d", s, sel.m6, sel.m7);
      end
      step = STEP_DL0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
