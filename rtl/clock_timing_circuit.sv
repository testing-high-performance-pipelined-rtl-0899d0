// clock_timing_circuit: on-chip generator of the six pipeline register
// clocks CK0..CK5 for normal operation, for delay testing of one pipeline
// stage at a time from a slow tester clock, and for testing itself.
// Behavioural model: it contains the analog PLL, DLL and delay lines.
//
// Structure (one instance of each):
//   PLL          IPCLK (100 MHz) -> HFCLK (1 GHz), used only for calibration
//   M1 (2:1)     J = IPCLK or HFCLK
//   PSD          J -> U (to CLK), B = J + t/2 (to DL1), A = J + t (to DL2)
//   DL0 (10)     HFCLK -> H; calibration line of the DLL
//   DL1 (11)     B -> taps, G = tap 10, F = tap 11
//   DL2 (10)     A -> taps, E = tap 10
//   M2 (16:1)    DCLK = tap m, Td(DCLK - CLK) = 250 ps + 50 ps * m; even m
//                are DL1 taps 2..9, odd m are DL2 taps 2..9
//   M5 (6x2:1)   CKi = CLK or DCLK
//   M6, M7 (6:1) CKi -> D, CKi+1 -> I (self-test of M5)
//   M3 (4:1)     X = A, B, C or D;   M4 (5:1)  Y = E, F, G, H or I
//   DLL          X, Y -> Vp, Vn, shared by every delay element
//   ctc_control  decodes the mode inputs into the multiplexer selects
// CLK is node U. In silicon a buffer matching the delay of M2 sits there;
// every multiplexer has zero delay in this model, so the buffer is left out.
// t is the element delay set by the DLL, 100 ps once it has locked on DL0
// with HFCLK (10 elements = one 1 ns period).
module clock_timing_circuit
  import ctc_pkg::*;
(
  input  logic              ipclk,     // tester clock
  input  mode_e             mode,
  input  logic [2:0]        stage,     // stage under test (DUT test, M5 test)
  input  logic [3:0]        td_code,   // Td = 250 ps + 50 ps * td_code
  input  ctc_step_e         step,      // self-test loop closure
  output logic [NUM_CK-1:0] ck,        // CK0..CK5 to the pipeline registers
  output real               vn_mon,    // DLL output Vn, observed off chip
  output logic              pll_locked,
  output logic              dll_locked
);
  timeunit 1ps; timeprecision 1fs;

  mux_sel_t sel;
  logic hfclk, j, u, a, b, clk, dclk, x, y, d_node, i_node;
  logic [DL0_LEN:1] dl0;
  logic [DL1_LEN:1] dl1;
  logic [DL2_LEN:1] dl2;
  logic [NUM_TAPS-1:0] m2_in;
  real vp, vn;

  ctc_control u_ctl (.mode(mode), .stage(stage), .td_code(td_code), .step(step), .sel(sel));

  pll #(.MULT(PLL_MULT)) u_pll (.ref_clk(ipclk), .en(sel.analog_en), .out(hfclk), .locked(pll_locked));

  clock_mux #(.N(2)) u_m1 (.in({hfclk, ipclk}), .sel(sel.m1), .out(j));

  psd u_psd (.j(j), .vp(vp), .vn(vn), .u(u), .a(a), .b(b));

  delay_line #(.LEN(DL0_LEN)) u_dl0 (.in(hfclk), .vp(vp), .vn(vn), .tap(dl0));
  delay_line #(.LEN(DL1_LEN)) u_dl1 (.in(b),     .vp(vp), .vn(vn), .tap(dl1));
  delay_line #(.LEN(DL2_LEN)) u_dl2 (.in(a),     .vp(vp), .vn(vn), .tap(dl2));

  always_comb
    for (int m = 0; m < int'(NUM_TAPS); m++)
      m2_in[m] = (m % 2 == 0) ? dl1[int'(FIRST_TAP) + m / 2]
                              : dl2[int'(FIRST_TAP) + (m - 1) / 2];

  clock_mux #(.N(NUM_TAPS)) u_m2 (.in(m2_in), .sel(sel.m2), .out(dclk));

  assign clk = u;

  reg_clock_select #(.NUM_CK(NUM_CK)) u_m5 (.clk(clk), .dclk(dclk), .use_dclk(sel.m5_dclk), .ck(ck));

  clock_mux #(.N(NUM_CK)) u_m6 (.in(ck), .sel(sel.m6), .out(d_node));
  clock_mux #(.N(NUM_CK)) u_m7 (.in(ck), .sel(sel.m7), .out(i_node));

  //                                         D       C      B  A
  clock_mux #(.N(4)) u_m3 (.in({d_node, hfclk, b, a}), .sel(sel.m3), .out(x));
  //                                         I       H             G             F             E
  clock_mux #(.N(5)) u_m4 (.in({i_node, dl0[DL0_LEN], dl1[DL1_LEN-1], dl1[DL1_LEN], dl2[DL2_LEN]}),
                           .sel(sel.m4), .out(y));

  dll u_dll (.x(x), .y(y), .en(sel.analog_en), .vp(vp), .vn(vn), .locked(dll_locked));

  assign vn_mon = vn;
endmodule
