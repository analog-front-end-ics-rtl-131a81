// Pair chopper: the clock chopper and the data chopper of the timing-skew calibration.
//
// M channels carry W-bit signals.  swap[j] = 1 (chopping sequence q = -1) exchanges the
// signals of channels j and j+1; swap[j] = 0 (q = +1) passes them straight through, as the
// document describes.  Adjacent pairs may not be swapped at the same time (asserted); the
// skew calibration processor only chops non-overlapping pairs.  With W = 1 it routes the
// clock phases, with W = N it routes the channel output words back into time order.
// Combinational.
module pair_chopper #(
  parameter int unsigned M = 8,
  parameter int unsigned W = 6
) (
  input  logic [M-2:0]        swap,
  input  logic [M-1:0][W-1:0] din,
  output logic [M-1:0][W-1:0] dout
);
  timeunit 1ps;
  timeprecision 1fs;

  always_comb begin
    for (int i = 0; i < int'(M); i++) begin
      dout[i] = din[i];
      if (i < int'(M) - 1 && swap[i])  dout[i] = din[i+1];
      else if (i > 0 && swap[i-1])     dout[i] = din[i-1];
    end
  end

  always_comb begin
    for (int i = 0; i < int'(M) - 2; i++)
      a_no_overlap: assert (!(swap[i] && swap[i+1]));
  end
endmodule
