// psd: behavioural model (not synthesizable logic) of the phase splitter &
// delay circuit.
//
// The phase splitter turns the clock J into two complementary clocks, U = J
// and V = ~J. U is the source of CLK and, through one delay element, of
// node A, the input of DL2. V goes through an inverting half delay element
// to node B, the input of DL1. With a locked element delay t (100 ps),
//   B = J delayed by t/2,  A = J delayed by t,
// so A lags B by half an element delay (50 ps), the resolution step of Td.
module psd (
  input  logic j,
  input  real  vp,
  input  real  vn,
  output logic u,     // to the CLK buffer
  output logic a,     // to DL2
  output logic b      // to DL1
);
  timeunit 1ps; timeprecision 1fs;

  logic v;

  // phase splitter (ideal, no delay in this model)
  always_comb begin
    u = j;
    v = ~j;
  end

  delay_element      u_del  (.in(u), .vp(vp), .vn(vn), .out(a));
  half_delay_element u_half (.in(v), .vp(vp), .vn(vn), .out(b));
endmodule
