// Self-checking test of the random chopping comparator model (reference 10 LSB, mismatch
// offset +0.3 LSB, trim step 0.25 LSB).  For random held inputs, chopping states and trim
// codes the decision must equal the reference: dc = 1 when vs - 10 > -q * (0.3 - 0.25 * T)
// for q = +1, and when vs - 10 >= (0.3 - 0.25 * T) for q = -1.  Both chopping states must
// give decisions that differ for the same input (the offset is chopped).
module tb_rcc_model;
  timeunit 1ps;
  timeprecision 1fs;

  logic latch = 1'b0, q_pos, dc;
  logic signed [5:0] trim;
  real vs;
  int checks = 0, failures = 0, n_differ = 0;

  rcc_model #(.TW(6), .VREF(10.0), .VOS0(0.3), .DV(0.25)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic ref_dc(real v, logic qp, int t);
    real e;
    e = 0.3 - 0.25 * t;
    return qp ? ((v - 10.0) > -e) : ((v - 10.0) >= e);
  endfunction

  initial begin
    for (int k = 0; k < 4000; k++) begin
      logic d0;
      vs    = 8.0 + real'($urandom % 4000) / 1000.0;
      trim  = 6'($signed(int'($urandom % 9) - 4));
      q_pos = 1'b1;
      #5 latch = 1'b1;
      #5 latch = 1'b0;
      check(dc == ref_dc(vs, 1'b1, int'(trim)), "q = +1 decision");
      d0 = dc;
      q_pos = 1'b0;
      #5 latch = 1'b1;
      #5 latch = 1'b0;
      check(dc == ref_dc(vs, 1'b0, int'(trim)), "q = -1 decision");
      if (dc != d0) n_differ++;
    end
    check(n_differ > 0, "chopping changes decisions near the threshold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
