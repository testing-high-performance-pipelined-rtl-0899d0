// dll: behavioural model (not synthesizable logic) of the delay-locked loop
// that calibrates the delay lines.
//
// It drives the control voltages Vn and Vp = VDD - Vn so that the clock at
// input Y lags the clock at input X by exactly one clock period. Model: on
// every rising edge of Y the phase detector takes the time from the nearest
// rising edge of X (the last one, or the next one expected one measured
// period later) as the phase error; a positive error (Y late, too much
// delay) raises Vn, which speeds the delay elements up. Vn moves by GAIN
// mV per ps of error per Y edge and is clamped to 0..VDD. Vn starts at
// VN_INIT. With en low Vn holds its value. `locked` is high while the last
// LOCK_COUNT errors were all within LOCK_TOL_PS.
module dll #(
  parameter real         GAIN        = 0.1,     // mV per ps
  parameter real         VN_INIT     = 900.0,   // mV
  parameter real         LOCK_TOL_PS = 0.5,
  parameter int unsigned LOCK_COUNT  = 16
) (
  input  logic x,
  input  logic y,
  input  logic en,
  output real  vp,
  output real  vn,
  output logic locked
);
  timeunit 1ps; timeprecision 1fs;

  realtime     tx_last, tx_prev;
  int unsigned x_edges;
  int unsigned good;

  initial begin
    vn      = VN_INIT;
    vp      = ctc_pkg::VDD_MV - VN_INIT;
    locked  = 1'b0;
    tx_last = 0.0;
    tx_prev = 0.0;
    x_edges = 0;
    good    = 0;
  end

  always @(posedge x) begin
    tx_prev = tx_last;
    tx_last = $realtime;
    if (x_edges < 2) x_edges++;
  end

  always @(posedge y) begin
    automatic real since = $realtime - tx_last;
    automatic real per   = tx_last - tx_prev;
    automatic real err;
    if (en && x_edges >= 2) begin
      err = (since > per / 2.0) ? since - per : since;
      vn  = vn + GAIN * err;
      if (vn < 0.0)             vn = 0.0;
      if (vn > ctc_pkg::VDD_MV) vn = ctc_pkg::VDD_MV;
      vp  = ctc_pkg::VDD_MV - vn;
      if (err < LOCK_TOL_PS && err > -LOCK_TOL_PS) begin
        if (good < LOCK_COUNT) good++;
      end else begin
        good = 0;
      end
      locked = (good >= LOCK_COUNT);
    end
  end

  always @(negedge en) begin
    good   = 0;
    locked = 1'b0;
  end
endmodule
