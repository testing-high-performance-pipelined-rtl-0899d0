// ctc_pkg: constants, encodings and helpers of the clock timing circuit.
//
// Timing model. A delay element is two current-starved inverter halves;
// their delay falls as the DLL raises the control voltage Vn (and lowers
// Vp = VDD - Vn). The model used for one half is
//   t_half(Vn) = HALF_MIN_PS + HALF_SPAN_PS * exp(-(Vn - VN_NOM_MV)/VN_SLOPE_MV)
// so a whole element takes 60 ps at Vn = VDD (its minimum delay) and 100 ps
// at Vn = 611.5 mV, where a 10-element line spans one 1 GHz period. The
// 60 ps minimum, the 100 ps calibrated delay and the 611.5 mV locked value
// are the figures the method was characterised with; the exponential shape
// and its 148 mV slope are this model's own choice, picked so that a few
// tens of ps of extra loop delay move the locked Vn by a few tens of mV.
//
// Multiplexer input numbering (M3: A,B,C,D; M4: E,F,G,H,I; M1: IPCLK,HFCLK)
// is this design's choice; the select inputs have no published encoding.
package ctc_pkg;
  timeunit 1ps; timeprecision 1fs;

  // ---- analog model constants ------------------------------------------
  localparam real VDD_MV        = 1800.0;  // 0.18 um supply
  localparam real VN_NOM_MV     = 611.5;   // Vn at which an element is 100 ps
  localparam real VN_SLOPE_MV   = 148.0;
  localparam real HALF_MIN_PS   = 30.0;    // half of the 60 ps minimum
  localparam real HALF_SPAN_PS  = 20.0;    // half of (100 - 60) ps

  // ---- structure ---------------------------------------------------------
  localparam int unsigned NUM_CK      = 6;   // CK0..CK5
  localparam int unsigned NUM_STAGES  = 5;   // stages tested one at a time
  localparam int unsigned DL0_LEN     = 10;
  localparam int unsigned DL1_LEN     = 11;
  localparam int unsigned DL2_LEN     = 10;
  localparam int unsigned NUM_TAPS    = 16;  // inputs of M2
  localparam int unsigned FIRST_TAP   = 2;   // DL1/DL2 element feeding M2 input 0/1
  localparam int unsigned PLL_MULT    = 10;  // 100 MHz -> 1 GHz

  // ---- operating modes -----------------------------------------------------
  typedef enum logic [1:0] {
    MODE_NORMAL   = 2'd0,   // IPCLK to every register
    MODE_DUT_TEST = 2'd1,   // one register on DCLK, the rest on CLK
    MODE_CTC_TEST = 2'd2    // clock timing circuit self-test (HFCLK through DL1/DL2)
  } mode_e;

  // Steps of the clock timing circuit self-test: which node pair closes the DLL.
  typedef enum logic [2:0] {
    STEP_DL0   = 3'd0,  // phase 1: C -> X, H -> Y
    STEP_DL1   = 3'd1,  // phase 1: B -> X, G -> Y
    STEP_DL2   = 3'd2,  // phase 1: A -> X, E -> Y
    STEP_PSD_A = 3'd3,  // phase 2: A -> X, F -> Y
    STEP_PSD_B = 3'd4,  // phase 2: B -> X, E -> Y
    STEP_M5    = 3'd5   // phase 3: D -> X, I -> Y, CK(i) on CLK, CK(i+1) on DCLK
  } ctc_step_e;

  // M1 inputs
  localparam logic M1_IPCLK = 1'b0;
  localparam logic M1_HFCLK = 1'b1;
  // M3 inputs (to DLL input X)
  localparam logic [1:0] M3_A = 2'd0, M3_B = 2'd1, M3_C = 2'd2, M3_D = 2'd3;
  // M4 inputs (to DLL input Y)
  localparam logic [2:0] M4_E = 3'd0, M4_F = 3'd1, M4_G = 3'd2, M4_H = 3'd3, M4_I = 3'd4;

  // Select inputs of all multiplexers M1..M7.
  typedef struct packed {
    logic                m1;        // J from IPCLK (0) or HFCLK (1)
    logic [3:0]          m2;        // DCLK tap, Td = 250 ps + 50 ps * m2
    logic [1:0]          m3;        // DLL X source
    logic [2:0]          m4;        // DLL Y source
    logic [NUM_CK-1:0]   m5_dclk;   // 1: CKi = DCLK, 0: CKi = CLK
    logic [2:0]          m6;        // CK index to node D
    logic [2:0]          m7;        // CK index to node I
    logic                analog_en; // PLL and DLL running
  } mux_sel_t;

  // Delay element half-stage delay for control voltages vp, vn (mV).
  function automatic real half_delay_ps(real vp, real vn);
    real drive;
    drive = 0.5 * (vn + (VDD_MV - vp));
    return HALF_MIN_PS + HALF_SPAN_PS * $exp(-(drive - VN_NOM_MV) / VN_SLOPE_MV);
  endfunction

  // Wait a computed delay given in femtoseconds (up to about 8.4 ns). It is
  // built from fixed binary-weighted waits so that every delay control in the
  // analog models is a constant.
  task automatic wait_fs(input logic [22:0] dfs);
    if (dfs[0])  #1fs;
    if (dfs[1])  #2fs;
    if (dfs[2])  #4fs;
    if (dfs[3])  #8fs;
    if (dfs[4])  #16fs;
    if (dfs[5])  #32fs;
    if (dfs[6])  #64fs;
    if (dfs[7])  #128fs;
    if (dfs[8])  #256fs;
    if (dfs[9])  #512fs;
    if (dfs[10]) #1024fs;
    if (dfs[11]) #2048fs;
    if (dfs[12]) #4096fs;
    if (dfs[13]) #8192fs;
    if (dfs[14]) #16384fs;
    if (dfs[15]) #32768fs;
    if (dfs[16]) #65536fs;
    if (dfs[17]) #131072fs;
    if (dfs[18]) #262144fs;
    if (dfs[19]) #524288fs;
    if (dfs[20]) #1048576fs;
    if (dfs[21]) #2097152fs;
    if (dfs[22]) #4194304fs;
  endtask

  // Convert picoseconds to the femtosecond count taken by wait_fs (saturating).
  function automatic logic [22:0] ps_to_fs(real ps);
    real f;
    f = ps * 1000.0;
    if (f < 0.0)        return '0;
    if (f > 8388607.0)  return '1;
    return 23'(longint'(f));
  endfunction
endpackage
