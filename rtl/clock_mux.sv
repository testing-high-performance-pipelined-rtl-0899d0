// clock_mux: N-input clock multiplexer (M1, M2, M3, M4, M6 and M7 of the
// clock timing circuit).
//
// out = in[sel]; a select value of N or more gives a constant 0. The select
// inputs are static configuration; they are changed only while the clocks
// through the multiplexer may glitch (between test steps). Combinational,
// zero delay in this model.
module clock_mux #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0]         in,
  input  logic [$clog2(N)-1:0] sel,
  output logic                 out
);
  timeunit 1ps; timeprecision 1fs;

  always_comb out = (int'(sel) < int'(N)) ? in[sel] : 1'b0;
endmodule
