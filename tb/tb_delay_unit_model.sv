// Self-checking test of the delay-unit model (20 ps base, +1.5 ps route mismatch, 2.232 ps
// step): for codes -8..+15 every output pulse must rise 21.5 - 2.232 * code ps after the
// input (zero when that is negative) and last 15 ps.
module tb_delay_unit_model;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real STEP = 62.5 / 28.0;
  logic ck_in = 1'b0, ck_out;
  logic signed [5:0] code;
  int checks = 0, failures = 0;
  real t_in, exp_d;

  delay_unit_model #(.TW(6), .TAU0_PS(20.0), .STEP_PS(STEP), .ROUTE_PS(1.5)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge ck_out) begin
    check($realtime - t_in - exp_d < 0.001 && exp_d - ($realtime - t_in) < 0.001,
          $sformatf("code %0d delay %0.3f expected %0.3f", code, $realtime - t_in, exp_d));
    #(14.9);
    check(ck_out == 1'b1, "pulse high");
    #(0.2);
    check(ck_out == 1'b0, "pulse width");
  end

  initial begin
    for (int c = -8; c <= 15; c++) begin
      code = 6'(c);
      exp_d = 21.5 - STEP * c;
      if (exp_d < 0.0) exp_d = 0.0;
      #100;
      t_in = $realtime;
      ck_in = 1'b1;
      #10 ck_in = 1'b0;
      #100;
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
