// Self-checking test of the 63-to-6 edge encoder: each single edge bit j-1 must encode to j,
// no edge bit to 0, and two edge bits to the OR of their codes.
module tb_edge_encoder;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int N = 6;
  localparam int L = 63;
  logic [L-1:0] de;
  logic [N-1:0] code;
  int checks = 0, failures = 0;

  edge_encoder #(.N(N)) dut (.de, .code);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    de = '0;
    #1 check(code == 0, "no edge");
    for (int j = 1; j <= L; j++) begin
      de = '0;
      de[j-1] = 1'b1;
      #1 check(int'(code) == j, $sformatf("edge at %0d gives %0d", j, code));
    end
    for (int k = 0; k < 200; k++) begin
      int a, b;
      a = 1 + $urandom % L;
      b = 1 + $urandom % L;
      de = '0;
      de[a-1] = 1'b1;
      de[b-1] = 1'b1;
      #1 check(int'(code) == (a | b), "two edges");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
