// Self-checking test of lfsr_seq.  A 7-bit register with taps 7 and 6 must run through all
// 127 non-zero states before repeating (maximal length), each bit must be the previous
// state's lower bit (shifted copies of one sequence), the output sequence must hold 64 ones
// per period, en = 0 must hold the state, and the 63-bit default must never reach zero.
module tb_lfsr_seq;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  logic [6:0]  st;
  logic [62:0] st63;
  int checks = 0, failures = 0;
  bit seen [128];
  int ones = 0;

  lfsr_seq #(.W(7), .TAP_A(7), .TAP_B(6), .SEED(7'h1)) dut (.clk, .rst_n, .en, .state(st));
  lfsr_seq u63 (.clk, .rst_n, .en(1'b1), .state(st63));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [6:0] prev;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(st == 7'h1, "seed after reset");
    for (int k = 0; k < 127; k++) begin
      check(!seen[st], $sformatf("state %h repeats after %0d steps", st, k));
      seen[st] = 1'b1;
      ones += st[0];
      prev = st;
      @(posedge clk);
      #1;
      check(st[6:1] == prev[5:0], "shift");
      check(st[0] == (prev[6] ^ prev[5]), "feedback");
      check(st63 != '0, "63-bit register non-zero");
    end
    check(st == 7'h1, "period 127");
    check(ones == 64, $sformatf("%0d ones per period", ones));
    en = 1'b0;
    prev = st;
    repeat (3) @(posedge clk);
    #1 check(st == prev, "hold with en = 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
