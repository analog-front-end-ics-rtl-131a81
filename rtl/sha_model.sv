// Behavioural model of a sample-and-hold amplifier (SHA).  Not synthesizable.
//
// vin is the analog input in LSB units, presented as a piecewise-linear waveform whose
// breakpoints lie on a grid of STEP_PS (the source updates vin at every multiple of
// STEP_PS).  On each rising edge of ck the model takes the value at that exact instant by
// interpolating between the breakpoints around it, which waits for the next breakpoint; it
// then drives vout with the held value and pulses hold high for HOLD_PS.  Bandwidth, noise
// and droop are not modelled.  The interpolation scheme and grid are this model's choices.
module sha_model #(
  parameter real STEP_PS = 2.0,
  parameter real HOLD_PS = 1.0
) (
  input  logic ck,
  input  real  vin,
  output real  vout,
  output logic hold
);
  timeunit 1ps;
  timeprecision 1fs;

  real t_s, t_lo, v_lo, v_hi;

  initial begin
    vout = 0.0;
    hold = 1'b0;
  end

  always @(posedge ck) begin
    t_s  = $realtime;
    t_lo = STEP_PS * $floor(t_s / STEP_PS);
    v_lo = vin;
    #(t_lo + STEP_PS - t_s + 0.001);
    v_hi = vin;
    vout = v_lo + (v_hi - v_lo) * (t_s - t_lo) / STEP_PS;
    hold = 1'b1;
    #(HOLD_PS);
    hold = 1'b0;
  end
endmodule
