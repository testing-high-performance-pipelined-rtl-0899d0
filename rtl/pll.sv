// pll: behavioural model (not synthesizable logic) of the phase-locked loop
// used as a frequency multiplier.
//
// From the tester clock ref (IPCLK, 100 MHz) it makes out (HFCLK) at MULT
// times the frequency (1 GHz). The model measures the reference period,
// smooths it with a first-order filter (weight 1/8 for each new
// measurement), which stands for the loop filter that keeps tester jitter
// out of HFCLK, and on every rising edge of ref emits MULT pulses of the
// filtered period / MULT, the first rising edge aligned with ref. `locked`
// rises after LOCK_EDGES reference edges. With en low the output stays 0
// (the PLL is off in normal mode).
module pll #(
  parameter int unsigned MULT       = 10,
  parameter int unsigned LOCK_EDGES = 4
) (
  input  logic ref_clk,
  input  logic en,
  output logic out,
  output logic locked
);
  timeunit 1ps; timeprecision 1fs;

  realtime     t_last;
  real         period_ps;
  int unsigned edges;

  initial begin
    out       = 1'b0;
    locked    = 1'b0;
    t_last    = 0.0;
    period_ps = 0.0;
    edges     = 0;
  end

  always @(posedge ref_clk) begin
    automatic real meas = $realtime - t_last;
    automatic real half_ps;
    t_last = $realtime;
    if (!en) begin
      edges  = 0;
      locked = 1'b0;
    end else begin
      if (edges == 1)     period_ps = meas;
      else if (edges > 1) period_ps = period_ps + (meas - period_ps) / 8.0;
      if (edges < LOCK_EDGES) edges++;
      locked = (edges >= LOCK_EDGES);
      if (edges > 1) begin
        half_ps = period_ps / (2.0 * real'(MULT));
        for (int unsigned k = 0; k < MULT; k++) begin
          out = 1'b1;
          ctc_pkg::wait_fs(ctc_pkg::ps_to_fs(half_ps));
          out = 1'b0;
          if (k != MULT - 1) ctc_pkg::wait_fs(ctc_pkg::ps_to_fs(half_ps));
        end
      end
    end
  end
endmodule
