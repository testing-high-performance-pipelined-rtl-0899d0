// delay_element: behavioural model (not synthesizable logic) of the
// voltage-controlled delay element of the delay lines DL0, DL1 and DL2.
//
// Two inverting halves (half_delay_element) in series give a non-inverting
// delay of 2 * half_delay_ps(vp, vn): 100 ps at the calibrated control
// voltage (Vn = 611.5 mV in this model), 60 ps at its minimum. Both edges
// see the same delay in the model.
module delay_element (
  input  logic in,
  input  real  vp,
  input  real  vn,
  output logic out
);
  timeunit 1ps; timeprecision 1fs;

  logic mid;

  half_delay_element u_h0 (.in(in),  .vp(vp), .vn(vn), .out(mid));
  half_delay_element u_h1 (.in(mid), .vp(vp), .vn(vn), .out(out));
endmodule
