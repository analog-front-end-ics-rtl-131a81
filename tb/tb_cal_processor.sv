// Self-checking test of cal_processor with NC = 5 and a 4-bit ACC2, so that thresholds and
// ACC2 saturation are reached quickly.  Random en / d / q stimulus; a reference model of
// ACC1, the BPD and ACC2 written here is compared with R, S and T after every clock.
// Each mechanism (S = +1, S = -1, ACC1 reset, ACC2 saturation at both ends) must occur.
module tb_cal_processor;
  timeunit 1ps;
  timeprecision 1fs;
  import tiadc_pkg::*;

  localparam int NC = 5;
  localparam int TW = 4;
  localparam int RW = $clog2(NC + 1) + 1;

  logic clk = 1'b0, rst_n = 1'b0, en, d, q_pos;
  logic signed [RW-1:0] r;
  bpd_e s;
  logic signed [TW-1:0] t;

  int checks = 0, failures = 0;
  int ref_r = 0, ref_t = 0, ref_s;
  int n_pos = 0, n_neg = 0, n_satp = 0, n_satn = 0;
  int bias;

  cal_processor #(.NC(NC), .TW(TW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    en = 0; d = 0; q_pos = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 20000; k++) begin
      // Slowly changing bias so that T wanders through its whole range.
      bias = ((k / 2500) % 2 == 0) ? 70 : 30;
      en    = ($urandom % 100) < 90;
      d     = ($urandom % 100) < 50;
      q_pos = ($urandom % 100) < bias;
      @(posedge clk);
      // Reference: S from R before the edge, then update.
      ref_s = (ref_r >= NC) ? 1 : (ref_r <= -NC) ? -1 : 0;
      check(s == (ref_s == 1 ? S_POS : ref_s == -1 ? S_NEG : S_ZERO), "S before edge");
      if (ref_s != 0) begin
        ref_r = 0;
        if (ref_s == 1) begin
          n_pos++;
          if (ref_t < (1 << (TW - 1)) - 1) ref_t++; else n_satp++;
        end else begin
          n_neg++;
          if (ref_t > -(1 << (TW - 1))) ref_t--; else n_satn++;
        end
      end else if (en && d) begin
        ref_r += q_pos ? 1 : -1;
      end
      #1;
      check(int'(r) == ref_r, $sformatf("R %0d expected %0d", r, ref_r));
      check(int'(t) == ref_t, $sformatf("T %0d expected %0d", t, ref_t));
    end
    $display("S+ %0d S- %0d saturations %0d/%0d", n_pos, n_neg, n_satp, n_satn);
    check(n_pos > 0 && n_neg > 0, "both BPD outputs occurred");
    check(n_satp > 0 && n_satn > 0, "ACC2 saturated at both ends");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 25000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
