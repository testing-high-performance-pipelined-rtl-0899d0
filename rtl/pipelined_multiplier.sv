// pipelined_multiplier: 16 x 16 -> 32 bit unsigned multiplier in five
// pipeline stages, the test vehicle of the clock-shifting test method.
//
// Registers R0..R5 separate the stages
//   R0 -> SN_L1 (partial products + 1st 4-2 level, 16 -> 8) -> R1
//      -> SN_L2 (8 -> 4) -> R2 -> SN_L3 (4 -> 2) -> R3
//      -> CLA_L1 (block conditional sums)  -> R4
//      -> CLA_L2 (block carries, sum select) -> R5 = product.
// Each register Ri has its own clock ck[i]. In normal operation all six
// clocks are the same clock and the product of operands captured by R0 on
// one edge appears in R5 five edges later. In the DUT test mode the clock
// of one register Ri+1 is a delayed copy (by Td) of the others, so that R
// i+1 captures what stage i computed from the value R i launched on the same
// edge: the path through stage i then has only Td to settle, all other
// stages have a whole slow clock period, and the latency drops to four
// edges.
// The data path holds no reset and no test hardware: the registers are
// plain flip-flops, as the method requires. (Register contents before the
// pipeline has been filled are therefore meaningless.)
module pipelined_multiplier
  import mult_pkg::*;
(
  input  logic [NUM_REGS-1:0] ck,       // CK0..CK5, one per register
  input  operand_t            a,
  input  operand_t            b,
  output word_t               product   // register R5
);
  timeunit 1ps; timeprecision 1fs;

  // R0
  operand_t a_r0, b_r0;
  // R1..R4
  word_t    r1 [L1_W];
  word_t    r2 [L2_W];
  word_t    r3_s, r3_c;
  cla_mid_t r4;

  // stage outputs
  word_t    sn1 [L1_W];
  word_t    sn2 [L2_W];
  word_t    sn3_s, sn3_c;
  cla_mid_t cla1;
  word_t    cla2;

  always_ff @(posedge ck[0]) begin
    a_r0 <= a;
    b_r0 <= b;
  end

  sn_l1 u_sn_l1 (.a(a_r0), .b(b_r0), .ps(sn1));

  always_ff @(posedge ck[1]) r1 <= sn1;

  sn_l2 u_sn_l2 (.ps_in(r1), .ps_out(sn2));

  always_ff @(posedge ck[2]) r2 <= sn2;

  sn_l3 u_sn_l3 (.ps_in(r2), .s(sn3_s), .c(sn3_c));

  always_ff @(posedge ck[3]) begin
    r3_s <= sn3_s;
    r3_c <= sn3_c;
  end

  cla_l1 u_cla_l1 (.s(r3_s), .c(r3_c), .mid(cla1));

  always_ff @(posedge ck[4]) r4 <= cla1;

  cla_l2 u_cla_l2 (.mid(r4), .product(cla2));

  always_ff @(posedge ck[5]) product <= cla2;
endmodule
