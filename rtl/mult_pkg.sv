// mult_pkg: sizes and types shared by the 16-bit pipelined multiplier.
//
// The multiplier takes two 16-bit unsigned operands and produces a 32-bit
// product. With no operand recoding there are 16 partial products, which
// three levels of 4-2 compression reduce to 16 -> 8 -> 4 -> 2 words. The
// final carry-lookahead adder is split into 4-bit blocks (block width is a
// choice of this design; the source of the architecture does not give it).
package mult_pkg;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned OP_W    = 16;          // operand width
  localparam int unsigned PROD_W  = 2 * OP_W;    // product width
  localparam int unsigned NUM_PP  = OP_W;        // partial products (no encoding)
  localparam int unsigned L1_W    = NUM_PP / 2;  // words after level 1 (8)
  localparam int unsigned L2_W    = L1_W / 2;    // words after level 2 (4)
  localparam int unsigned BLK_W   = 4;           // carry-lookahead block width
  localparam int unsigned NUM_BLK = PROD_W / BLK_W;
  localparam int unsigned NUM_REGS   = 6;        // R0..R5
  localparam int unsigned NUM_STAGES = 5;        // SN_L1, SN_L2, SN_L3, CLA_L1, CLA_L2

  typedef logic [OP_W-1:0]    operand_t;
  typedef logic [PROD_W-1:0]  word_t;
  typedef logic [NUM_BLK-1:0] blk_vec_t;

  // Contents of register R4: per-block conditional sums and block carries.
  typedef struct packed {
    word_t    sum0;  // block sums assuming carry-in 0
    word_t    sum1;  // block sums assuming carry-in 1
    blk_vec_t gen;   // block generates a carry
    blk_vec_t prop;  // block propagates a carry
  } cla_mid_t;
endpackage
