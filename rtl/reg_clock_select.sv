// reg_clock_select: multiplexer M5, six 2:1 clock multiplexers that give
// each pipeline register clock CKi either CLK or the delayed clock DCLK.
//
// ck[i] = use_dclk[i] ? dclk : clk. In normal mode and for every register
// but the target one in DUT test mode use_dclk[i] is 0. Combinational.
module reg_clock_select #(
  parameter int unsigned NUM_CK = 6
) (
  input  logic              clk,
  input  logic              dclk,
  input  logic [NUM_CK-1:0] use_dclk,
  output logic [NUM_CK-1:0] ck
);
  timeunit 1ps; timeprecision 1fs;

  always_comb
    for (int i = 0; i < int'(NUM_CK); i++)
      ck[i] = use_dclk[i] ? dclk : clk;
endmodule
