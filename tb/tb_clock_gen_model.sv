// Self-checking test of the multi-phase clock generator model (8 phases, 500 ps period,
// 11.25 ps offset): phase j must rise 11.25 + j * 62.5 ps after every reference edge and fall
// 62.5/4 ps later, and clk_fs must rise 8 times per reference period.
module tb_clock_gen_model;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int M = 8;
  logic clk_ref = 1'b0, clk_fs;
  logic [M-1:0] phi;
  int checks = 0, failures = 0, n_fs = 0;
  real t_ref;

  clock_gen_model #(.M(M), .TC_PS(500.0), .T_OFF_PS(11.25)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic bit near(real a, real b);
    return (a - b < 0.001) && (b - a < 0.001);
  endfunction

  always #250 clk_ref = ~clk_ref;
  always @(posedge clk_ref) t_ref = $realtime;
  always @(posedge clk_fs) n_fs++;

  for (genvar j = 0; j < M; j++) begin : g_chk
    real t_rise;
    bit  seen = 1'b0;                  // ignores a fall from a random start-up value
    always @(posedge phi[j]) begin
      t_rise = $realtime;
      seen   = 1'b1;
      check(near(t_rise - t_ref, 11.25 + j * 62.5), $sformatf("phase %0d rise %0.3f", j, t_rise - t_ref));
    end
    always @(negedge phi[j]) if (seen) check(near($realtime - t_rise, 62.5 / 4.0), "pulse width");
  end

  initial begin
    #(250.0 + 20 * 500.0);
    check(n_fs == 8 * 20, $sformatf("%0d clk_fs edges in 20 periods", n_fs));
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
