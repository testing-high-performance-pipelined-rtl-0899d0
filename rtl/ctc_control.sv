// ctc_control: decodes the test control inputs of the clock timing circuit
// into the select inputs of multiplexers M1..M7.
//
//  * MODE_NORMAL: M1 passes IPCLK, M5 puts CLK on every register, the PLL
//    and DLL are switched off.
//  * MODE_DUT_TEST: M1 passes IPCLK; M2 selects tap td_code (Td = 250 ps +
//    50 ps * td_code); M5 puts DCLK on CK(stage+1), where stage 0..4 is the
//    pipeline stage under test, and CLK on all others. The DLL is closed
//    around DL0 (C -> X, H -> Y) fed with HFCLK, which calibrates every
//    delay element to 100 ps.
//  * MODE_CTC_TEST: M1 passes HFCLK. `step` chooses the DLL loop closure of
//    the three-phase self-test: DL0 (C,H), DL1 (B,G), DL2 (A,E), the phase
//    splitter (A,F) and (B,E), and the M5 paths (D,I) with M2 on tap 15
//    (Td = 1 ns), CK(stage) on CLK, CK(stage+1) on DCLK, M6 = CK(stage) and
//    M7 = CK(stage+1).
// The encoding of these inputs is this design's own; the source only says
// what each mode must route. Purely combinational.
module ctc_control
  import ctc_pkg::*;
(
  input  mode_e     mode,
  input  logic [2:0] stage,     // pipeline stage under test, 0..4
  input  logic [3:0] td_code,   // M2 tap in DUT test mode
  input  ctc_step_e step,       // self-test step in CTC test mode
  output mux_sel_t  sel
);
  timeunit 1ps; timeprecision 1fs;

  logic              stage_ok;
  logic [NUM_CK-1:0] dclk_onehot;

  always_comb begin
    stage_ok    = int'(stage) < int'(NUM_STAGES);
    dclk_onehot = stage_ok ? (NUM_CK'(1) << (stage + 3'd1)) : '0;

    sel           = '0;
    sel.m1        = M1_IPCLK;
    sel.m2        = td_code;
    sel.m3        = M3_C;
    sel.m4        = M4_H;
    sel.m6        = stage;
    sel.m7        = stage + 3'd1;
    sel.analog_en = 1'b0;

    unique case (mode)
      MODE_NORMAL: ;
      MODE_DUT_TEST: begin
        sel.m5_dclk   = dclk_onehot;
        sel.analog_en = 1'b1;
      end
      MODE_CTC_TEST: begin
        sel.m1        = M1_HFCLK;
        sel.analog_en = 1'b1;
        unique case (step)
          STEP_DL0:   begin sel.m3 = M3_C; sel.m4 = M4_H; end
          STEP_DL1:   begin sel.m3 = M3_B; sel.m4 = M4_G; end
          STEP_DL2:   begin sel.m3 = M3_A; sel.m4 = M4_E; end
          STEP_PSD_A: begin sel.m3 = M3_A; sel.m4 = M4_F; end
          STEP_PSD_B: begin sel.m3 = M3_B; sel.m4 = M4_E; end
          STEP_M5: begin
            sel.m2      = 4'(NUM_TAPS - 1);
            sel.m3      = M3_D;
            sel.m4      = M4_I;
            sel.m5_dclk = dclk_onehot;
          end
          default: ;
        endcase
      end
      default: ;
    endcase
  end

  // A stage number outside 0..4 selects no register for DCLK.
  always_comb
    if (mode == MODE_DUT_TEST || (mode == MODE_CTC_TEST && step == STEP_M5))
      assert (stage_ok || $isunknown(stage))
        else $error("ctc_control: stage %0d out of range", stage);
endmodule
