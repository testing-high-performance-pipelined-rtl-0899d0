// sn_l1: partial product generators and first level of the summation
// network (pipeline stage SN_L1).
//
// Without operand recoding, partial product j is operand a shifted left by
// j when bit j of operand b is 1, and zero otherwise: 16 partial products of
// 32 bits. Four 4-2 compressors reduce them to 8 words; compressor k takes
// partial products 4k..4k+3 and produces words 2k (sum) and 2k+1 (carry).
// The grouping of partial products into compressors is this design's
// choice. Combinational; the stage sits between registers R0 and R1.
module sn_l1
  import mult_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output word_t    ps [L1_W]
);
  timeunit 1ps; timeprecision 1fs;

  word_t pp [NUM_PP];

  always_comb begin
    for (int j = 0; j < int'(NUM_PP); j++)
      pp[j] = b[j] ? (word_t'(a) << j) : '0;
  end

  for (genvar k = 0; k < int'(NUM_PP / 4); k++) begin : g_cmp
    compressor_4_2 #(.W(PROD_W)) u_cmp (
      .x1(pp[4*k]), .x2(pp[4*k+1]), .x3(pp[4*k+2]), .x4(pp[4*k+3]),
      .sum(ps[2*k]), .carry(ps[2*k+1])
    );
  end
endmodule
