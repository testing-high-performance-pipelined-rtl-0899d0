// sn_l3: third level of the multiplier's summation network (pipeline stage
// SN_L3, between registers R2 and R3).
//
// One 4-2 compressor reduces the 4 partial sums of level 2 to the two
// operands s and c of the final carry-propagate adder. Combinational.
module sn_l3
  import mult_pkg::*;
(
  input  word_t ps_in [L2_W],
  output word_t s,
  output word_t c
);
  timeunit 1ps; timeprecision 1fs;

  compressor_4_2 #(.W(PROD_W)) u_cmp (
    .x1(ps_in[0]), .x2(ps_in[1]), .x3(ps_in[2]), .x4(ps_in[3]),
    .sum(s), .carry(c)
  );
endmodule
