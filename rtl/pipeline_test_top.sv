// pipeline_test_top: a pipelined circuit made testable by clock shifting,
// with the 16-bit five-stage multiplier as the pipeline. Behavioural model
// at this level because the clock timing circuit holds analog parts.
//
// Every register Ri of the multiplier has its own clock CKi, generated by
// the clock timing circuit from the tester clock IPCLK. The data path has no
// test logic at all:
//  * normal mode: CK0..CK5 are all IPCLK; the product of the operands
//    presented at one rising edge appears five edges later.
//  * DUT test mode: the tester runs IPCLK slowly (100 MHz) and picks the
//    stage i under test and Td (250..1000 ps in 50 ps steps). CK(i+1) is
//    IPCLK delayed by Td, all other clocks are IPCLK, so stage i must settle
//    within Td while every other stage has the whole slow period. Data then
//    crosses stage i on the same edge, and the product appears four edges
//    after the operands are taken.
//  * clock timing circuit test mode: the DLL is closed around different node
//    pairs and the tester compares the Vn values it reaches (vn_mon).
module pipeline_test_top
  import ctc_pkg::*;
  import mult_pkg::operand_t;
  import mult_pkg::word_t;
(
  input  logic       ipclk,
  input  mode_e      mode,
  input  logic [2:0] stage,
  input  logic [3:0] td_code,
  input  ctc_step_e  step,
  input  operand_t   a,
  input  operand_t   b,
  output word_t      product,
  output logic [NUM_CK-1:0] ck,
  output real        vn_mon,
  output logic       pll_locked,
  output logic       dll_locked
);
  timeunit 1ps; timeprecision 1fs;

  clock_timing_circuit u_ctc (
    .ipclk(ipclk), .mode(mode), .stage(stage), .td_code(td_code), .step(step),
    .ck(ck), .vn_mon(vn_mon), .pll_locked(pll_locked), .dll_locked(dll_locked)
  );

  pipelined_multiplier u_mult (.ck(ck), .a(a), .b(b), .product(product));
endmodule
