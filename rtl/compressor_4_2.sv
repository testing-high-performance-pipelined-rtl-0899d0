// compressor_4_2: word-wide 4-2 compressor of the multiplier's summation
// network.
//
// Four W-bit addends x1..x4 are reduced to two, sum and carry, so that
// sum + carry == x1 + x2 + x3 + x4 (mod 2**W). Each bit column is the
// classic 4-2 cell built from two full adders: the first adds x1, x2, x3
// and passes its carry (cout) to the next column's second adder as cin, so
// cout never depends on cin and no carry ripples more than one column. The
// second adder adds the first's sum, x4 and cin. Its carry has weight 2 and
// is returned shifted left by one in `carry`. Carries out of the top column
// are dropped; the product never exceeds 32 bits, so modulo arithmetic is
// exact. Purely combinational.
module compressor_4_2 #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] x3,
  input  logic [W-1:0] x4,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  timeunit 1ps; timeprecision 1fs;

  logic [W-1:0] s1;     // first full adder sum
  logic [W:0]   cin;    // lateral carry into each column
  logic [W-1:0] c2;     // second full adder carry (weight 2)

  always_comb begin
    cin[0] = 1'b0;
    for (int i = 0; i < int'(W); i++) begin
      s1[i]    = x1[i] ^ x2[i] ^ x3[i];
      cin[i+1] = (x1[i] & x2[i]) | (x1[i] & x3[i]) | (x2[i] & x3[i]);
      sum[i]   = s1[i] ^ x4[i] ^ cin[i];
      c2[i]    = (s1[i] & x4[i]) | (s1[i] & cin[i]) | (x4[i] & cin[i]);
    end
    carry = {c2[W-2:0], 1'b0};
  end
endmodule
