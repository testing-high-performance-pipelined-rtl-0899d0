// delay_line: behavioural model (not synthesizable logic) of a tapped delay
// line of LEN voltage-controlled delay elements (DL0: 10, DL1: 11, DL2: 10).
//
// tap[k] is the output of the k-th element, so it lags `in` by k element
// delays (k * 100 ps once the DLL has calibrated the line). All elements
// share the control voltages Vp and Vn.
module delay_line #(
  parameter int unsigned LEN = 10
) (
  input  logic         in,
  input  real          vp,
  input  real          vn,
  output logic [LEN:1] tap
);
  timeunit 1ps; timeprecision 1fs;

  logic [LEN:0] node;
  assign node[0] = in;

  for (genvar k = 1; k <= int'(LEN); k++) begin : g_el
    delay_element u_el (.in(node[k-1]), .vp(vp), .vn(vn), .out(node[k]));
  end

  assign tap = node[LEN:1];
endmodule
