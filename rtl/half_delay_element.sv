// half_delay_element: behavioural model (not synthesizable logic) of one
// half of the voltage-controlled delay element: a static inverter in
// parallel with a current-starved inverter whose pull-up and pull-down are
// throttled by the control voltages Vp and Vn.
//
// out follows the inverse of in after half_delay_ps(vp, vn) (see ctc_pkg),
// about 50 ps when the DLL is locked and 30 ps at full drive (Vp = VSS,
// Vn = VDD). Used on its own it is the inverting half delay element of the
// phase splitter; two in series make a delay element. Every input edge is
// carried to the output; edges closer together than the delay would be
// lost, which never happens at the clock rates used (>= 500 ps half period).
// `extra_ps` is an additional delay, 0 by default, that a testbench may set
// through the hierarchy to insert a delay fault.
module half_delay_element (
  input  logic in,
  input  real  vp,   // mV
  input  real  vn,   // mV
  output logic out
);
  timeunit 1ps; timeprecision 1fs;

  real extra_ps = 0.0;

  initial out = 1'b1;

  always @(in) begin
    automatic logic v = ~in;
    ctc_pkg::wait_fs(ctc_pkg::ps_to_fs(ctc_pkg::half_delay_ps(vp, vn) + extra_ps));
    out = v;
  end
endmodule
