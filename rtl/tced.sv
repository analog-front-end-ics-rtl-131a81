// Thermometer-code edge detector (TCED).
//
// The comparator outputs dc[0..L-1] (dc[j-1] is comparator j, reference V_R,j) form a
// thermometer code.  The edge code de marks the 1-0 transition: de[i] = dc[i] AND NOT dc[i+1],
// and the top comparator's edge bit is its own output.  For a clean thermometer code exactly
// one bit is set, or none when every comparator is 0.  Each calibration processor then
// observes its edge bit instead of its comparator output, which lowers the event probability
// it sees and hence the offset fluctuation.  The logic function follows the document's
// description; purely combinational.
module tced #(
  parameter int unsigned L = 63         // number of comparators, 2^N - 1
) (
  input  logic [L-1:0] dc,
  output logic [L-1:0] de
);
  timeunit 1ps;
  timeprecision 1fs;

  always_comb begin
    for (int i = 0; i < int'(L) - 1; i++) de[i] = dc[i] & ~dc[i+1];
    de[L-1] = dc[L-1];
  end
endmodule
