// sn_l2: second level of the multiplier's summation network (pipeline stage
// SN_L2, between registers R1 and R2).
//
// Two 4-2 compressors reduce the 8 partial sums of level 1 to 4; compressor
// k takes words 4k..4k+3 and produces words 2k (sum) and 2k+1 (carry).
// Combinational.
module sn_l2
  import mult_pkg::*;
(
  input  word_t ps_in  [L1_W],
  output word_t ps_out [L2_W]
);
  timeunit 1ps; timeprecision 1fs;

  for (genvar k = 0; k < int'(L1_W / 4); k++) begin : g_cmp
    compressor_4_2 #(.W(PROD_W)) u_cmp (
      .x1(ps_in[4*k]), .x2(ps_in[4*k+1]), .x3(ps_in[4*k+2]), .x4(ps_in[4*k+3]),
      .sum(ps_out[2*k]), .carry(ps_out[2*k+1])
    );
  end
endmodule
