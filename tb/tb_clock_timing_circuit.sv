// tb_clock_timing_circuit: self-checking test of the clock timing circuit
// model.
//  1. DUT test mode at IPCLK = 100 MHz: the PLL and the DLL (closed on DL0
//     with HFCLK) must lock with Vn at the 100 ps point (611.5 mV). For every
//     stage s and every delay code m, the rising edge of CK(s+1) must follow
//     that of CK(s) by 250 + 50 m ps, and the other clocks must rise with
//     CK(s).
//  2. Normal mode: every CKi must equal IPCLK.
//  3. Self-test mode: the DLL must lock on each loop. Loops of 10 elements
//     (C-H, B-G, A-E and CK(i)-CK(i+1) with Td = 1 ns) give the same Vn; the
//     10.5-element loops (A-F, B-E) settle where an element is 1000/10.5 ps,
//     Vn = 611.5 + 148 ln(40 / (1000/10.5 - 60)) mV in this model.
module tb_clock_timing_circuit;
  import ctc_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  logic ipclk = 1'b0;
  mode_e mode = MODE_DUT_TEST;
  logic [2:0] stage = '0;
  logic [3:0] td_code = '0;
  ctc_step_e step = STEP_DL0;
  logic [NUM_CK-1:0] ck;
  real vn;
  logic pll_locked, dll_locked;
  int half_ps = 5000;
  int checks = 0, failures = 0;

  clock_timing_circuit dut (.ipclk, .mode, .stage, .td_code, .step, .ck, .vn_mon(vn),
                            .pll_locked, .dll_locked);

  always begin
    #(half_ps * 1ps);
    ipclk = ~ipclk;
  end

  task automatic near(input string what, input real got, input real want, input real tol);
    checks++;
    if (got < want - tol || got > want + tol) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %f, expected %f", what, got, want);
    end
  endtask

  task automatic settle(input string what, input real want);
    #300ns;
    fork
      wait (dll_locked);
      #5us;
    join_any
    disable fork;
    checks++;
    if (!dll_locked) begin failures++; $display("FAIL no lock: %s", what); end
    near(what, vn, want, 1.0);
  endtask

  initial begin
    #1ms;  // watchdog: counts as one failure
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    realtime t0, t1;
    real vn_half;
    vn_half = VN_NOM_MV + VN_SLOPE_MV * $ln(40.0 / (1000.0 / 10.5 - 60.0));

    // 1. DUT test mode
    #3us;
    checks++; if (!pll_locked) begin failures++; $display("FAIL PLL not locked"); end
    settle("calibration on DL0", VN_NOM_MV);
    for (int s = 0; s < int'(NUM_STAGES); s++) begin
      for (int m = 0; m < int'(NUM_TAPS); m++) begin
        stage = 3'(s); td_code = 4'(m);
        @(negedge ipclk);
        @(posedge ck[s]); t0 = $realtime;
        #1;
        for (int i = 0; i < int'(NUM_CK); i++)
          if (i != s + 1) begin
            checks++;
            if (ck[i] !== 1'b1) begin failures++; $display("FAIL CK%0d not on CLK (stage %0d)", i, s); end
          end
        @(posedge ck[s+1]); t1 = $realtime;
        near($sformatf("Td stage %0d code %0d", s, m), t1 - t0, 250.0 + 50.0 * m, 0.1);
      end
    end

    // 2. normal mode, fast input clock
    mode = MODE_NORMAL; half_ps = 350;
    repeat (20) begin
      @(ipclk); #1;
      checks++;
      if (ck !== {NUM_CK{ipclk}}) begin failures++; $display("FAIL normal mode ck=%b", ck); end
    end

    // 3. self-test loops, IPCLK back to 100 MHz
    half_ps = 5000; mode = MODE_CTC_TEST;
    #2us;
    step = STEP_DL0;   settle("C-H", VN_NOM_MV);
    step = STEP_DL1;   settle("B-G", VN_NOM_MV);
    step = STEP_DL2;   settle("A-E", VN_NOM_MV);
    step = STEP_PSD_A; settle("A-F", vn_half);
    step = STEP_PSD_B; settle("B-E", vn_half);
    step = STEP_M5;
    for (int i = 0; i < 5; i++) begin
      stage = 3'(i);
      settle($sformatf("CK%0d-CK%0d", i, i + 1), VN_NOM_MV);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
