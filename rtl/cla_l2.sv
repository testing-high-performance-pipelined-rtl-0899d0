// cla_l2: second level of the carry-lookahead adder with conditional sum
// select (pipeline stage CLA_L2, between registers R4 and R5).
//
// From the block generate and propagate signals of cla_l1 it forms the
// carry into every 4-bit block with a parallel-prefix lookahead (three
// levels of generate/propagate combining over the 8 blocks), so that
//   cb[k] = OR over j<k of ( gen[j] AND prop[j+1] AND ... AND prop[k-1] ),
// with no carry into block 0, and then selects for each block the sum
// precomputed for that carry-in (sum1 if cb[k], else sum0). Combinational.
module cla_l2
  import mult_pkg::*;
(
  input  cla_mid_t mid,
  output word_t    product
);
  timeunit 1ps; timeprecision 1fs;

  blk_vec_t cb;  // carry into each block

  // Parallel-prefix (Kogge-Stone) lookahead over the 8 blocks: after level
  // l, (g_l[k], p_l[k]) describe the group of up to 2**l blocks ending at k.
  localparam int unsigned LEVELS = $clog2(NUM_BLK);
  blk_vec_t g_l [LEVELS+1];
  blk_vec_t p_l [LEVELS+1];

  assign g_l[0] = mid.gen;
  assign p_l[0] = mid.prop;

  for (genvar l = 0; l < int'(LEVELS); l++) begin : g_lvl
    for (genvar k = 0; k < int'(NUM_BLK); k++) begin : g_blk
      if (k >= (1 << l)) begin : g_comb
        assign g_l[l+1][k] = g_l[l][k] | (p_l[l][k] & g_l[l][k - (1 << l)]);
        assign p_l[l+1][k] = p_l[l][k] & p_l[l][k - (1 << l)];
      end else begin : g_pass
        assign g_l[l+1][k] = g_l[l][k];
        assign p_l[l+1][k] = p_l[l][k];
      end
    end
  end

  // carry into block k is the group generate of blocks 0..k-1
  assign cb = {g_l[LEVELS][NUM_BLK-2:0], 1'b0};

  always_comb
    for (int k = 0; k < int'(NUM_BLK); k++)
      product[k*BLK_W +: BLK_W] = cb[k] ? mid.sum1[k*BLK_W +: BLK_W]
                                        : mid.sum0[k*BLK_W +: BLK_W];
endmodule
