// (2^N - 1)-to-N encoder of the flash converter.
//
// Input is the edge code de from the TCED, where bit j-1 set means the input lies at or
// above reference j and below reference j+1, so the output code is j.  No bit set gives 0.
// Each output bit is the OR of the edge bits whose index has that bit set (a ROM-style
// encoder); with more than one edge bit set the result is the OR of their codes.  The
// document gives only the encoder's function; this OR structure is this design's choice.
// Combinational.
module edge_encoder #(
  parameter int unsigned N = 6,
  localparam int unsigned L = (1 << N) - 1
) (
  input  logic [L-1:0] de,
  output logic [N-1:0] code
);
  timeunit 1ps;
  timeprecision 1fs;

  always_comb begin
    code = '0;
    for (int j = 1; j <= int'(L); j++)
      if (de[j-1]) code = code | N'(j);
  end
endmodule
