// Behavioural model of a digitally-controlled delay unit and the clock route behind it.
// Not synthesizable.
//
// Each rising edge of ck_in gives a pulse of width PW_PS on ck_out, delayed by
// tau = TAU0_PS + ROUTE_PS - STEP_PS * code, the delay taken when the edge arrives.
// The next rising edge of ck_in must come later than tau + PW_PS.
// code is the signed ACC2 output T_j of the skew calibration processor; STEP_PS is the delay
// step mu_t (T_s/28 by default).  ROUTE_PS is the mismatch of the clock route from this unit
// to the channel's sample-and-hold, the error the calibration removes.  The document writes
// tau[k] = tau[0] + mu_t * T[k]; with the correlation sign used by the calibration processor
// the loop settles only when a positive code shortens the delay, so this model applies the
// code with a minus sign (equivalently, mu_t is a negative step).  The code must only change
// while ck_in is low.  A code that would make the delay negative gives zero delay.
module delay_unit_model #(
  parameter int unsigned TW       = 6,
  parameter real         TAU0_PS  = 20.0,
  parameter real         STEP_PS  = 62.5 / 28.0,
  parameter real         ROUTE_PS = 0.0,
  parameter real         PW_PS    = 15.0
) (
  input  logic                 ck_in,
  input  logic signed [TW-1:0] code,
  output logic                 ck_out
);
  timeunit 1ps;
  timeprecision 1fs;

  real tau_raw, tau_ps;
  assign tau_raw = TAU0_PS + ROUTE_PS - STEP_PS * real'(code);
  assign tau_ps  = (tau_raw > 0.0) ? tau_raw : 0.0;

  real tau_now;

  initial ck_out = 1'b0;
  always @(posedge ck_in) begin
    tau_now = tau_ps;
    #(tau_now);
    ck_out = 1'b1;
    #(PW_PS);
    ck_out = 1'b0;
  end
endmodule
