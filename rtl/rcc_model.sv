// Behavioural model of a random chopping comparator (RCC).  Not synthesizable.
//
// On each rising edge of latch it decides on the held input vs against its reference VREF
// (both in LSB units).  The input chopper CHP1 multiplies vs - VREF by q (q = +1 when
// q_pos = 1), the comparator adds its own offset V_OS and slices, and the output chopper
// CHP2 (an XNOR with q) undoes the input chopping, so dc = 1 means vs - VREF > -q*V_OS.
// The offset is V_OS[k] = VOS0 - DV * T[k] with T the trim code from the calibration
// processor: the document writes +DV*T, but with its correlator sign the loop converges only
// for a negative step, which this model builds in.  The chopping sign q' of CHP2 is taken
// equal to q of the same sample.  VOS0 is the random mismatch offset of this comparator.
module rcc_model #(
  parameter int unsigned TW   = 6,
  parameter real         VREF = 1.0,
  parameter real         VOS0 = 0.0,
  parameter real         DV   = 0.25
) (
  input  logic                 latch,
  input  real                  vs,
  input  logic                 q_pos,
  input  logic signed [TW-1:0] trim,
  output logic                 dc
);
  timeunit 1ps;
  timeprecision 1fs;

  real vos, vin_chopped;
  logic c;

  assign vos = VOS0 - DV * real'(trim);

  initial dc = 1'b0;

  always @(posedge latch) begin
    vin_chopped = q_pos ? (vs - VREF) : (VREF - vs);
    c  = (vin_chopped + vos) > 0.0;
    dc <= ~(c ^ q_pos);
  end
endmodule
