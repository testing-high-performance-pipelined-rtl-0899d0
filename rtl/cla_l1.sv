// cla_l1: first level of the carry-lookahead adder with conditional sum
// select (pipeline stage CLA_L1, between registers R3 and R4).
//
// The 32-bit operands s and c are cut into 8 blocks of 4 bits. For every
// block this level computes, with a carry lookahead inside the block, the
// block sum for a carry-in of 0 (sum0) and of 1 (sum1), and the block's
// carry generate (carry-out when carry-in is 0) and propagate (all bit
// positions propagate) signals. The carries between blocks and the choice
// of sum are left to cla_l2. The 4-bit block size is this design's choice.
// Combinational.
module cla_l1
  import mult_pkg::*;
(
  input  word_t    s,
  input  word_t    c,
  output cla_mid_t mid
);
  timeunit 1ps; timeprecision 1fs;

  always_comb begin
    logic [BLK_W-1:0] g, p;
    logic [BLK_W:0]   k0, k1;   // carries inside the block for cin 0 / 1
    mid = '0;
    for (int blk = 0; blk < int'(NUM_BLK); blk++) begin
      for (int i = 0; i < int'(BLK_W); i++) begin
        g[i] = s[blk*BLK_W+i] & c[blk*BLK_W+i];
        p[i] = s[blk*BLK_W+i] ^ c[blk*BLK_W+i];
      end
      // lookahead inside the block: k[i] = g[i-1] | p[i-1]g[i-2] | ... | p[i-1..0]cin
      for (int i = 0; i <= int'(BLK_W); i++) begin
        k0[i] = 1'b0;
        for (int j = 0; j < i; j++) begin
          logic pj;
          pj = 1'b1;
          for (int m = j + 1; m < i; m++) pj &= p[m];
          k0[i] |= g[j] & pj;
        end
        k1[i] = k0[i];
        begin
          logic pall;
          pall = 1'b1;
          for (int m = 0; m < i; m++) pall &= p[m];
          k1[i] |= pall;
        end
      end
      for (int i = 0; i < int'(BLK_W); i++) begin
        mid.sum0[blk*BLK_W+i] = p[i] ^ k0[i];
        mid.sum1[blk*BLK_W+i] = p[i] ^ k1[i];
      end
      mid.gen[blk]  = k0[BLK_W];
      mid.prop[blk] = &p;
    end
  end
endmodule
