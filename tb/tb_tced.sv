// Self-checking test of the thermometer-code edge detector with 63 comparators: every clean
// thermometer code (0..63 ones) must give exactly the edge bit at its top, and random codes
// with bubbles are compared with a reference that scans for 1-0 transitions.
module tb_tced;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int L = 63;
  logic [L-1:0] dc, de, exp_de;
  int checks = 0, failures = 0;

  tced #(.L(L)) dut (.dc, .de);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int n = 0; n <= L; n++) begin
      dc = (n == 0) ? '0 : {L{1'b1}} >> (L - n);
      exp_de = (n == 0) ? '0 : (L)'(1) << (n - 1);
      #1;
      check(de == exp_de, $sformatf("thermometer %0d ones: de %h", n, de));
    end
    for (int k = 0; k < 2000; k++) begin
      for (int i = 0; i < L; i++) dc[i] = ($urandom % 4) != 0;
      exp_de = '0;
      for (int i = L - 1; i >= 0; i--) begin
        logic above;
        above = (i == L - 1) ? 1'b0 : dc[i+1];
        if (dc[i] && !above) exp_de[i] = 1'b1;
      end
      #1;
      check(de == exp_de, "random code");
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
