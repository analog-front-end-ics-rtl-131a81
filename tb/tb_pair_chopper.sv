// Self-checking test of pair_chopper with 8 channels of 6 bits: random non-overlapping swap
// patterns, output compared with a reference permutation built here.
module tb_pair_chopper;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int M = 8;
  localparam int W = 6;
  logic [M-2:0]        swap;
  logic [M-1:0][W-1:0] din, dout;
  int checks = 0, failures = 0;
  int n_swapped = 0;

  pair_chopper #(.M(M), .W(W)) dut (.swap, .din, .dout);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int k = 0; k < 3000; k++) begin
      int src [M];
      for (int i = 0; i < M; i++) begin
        din[i] = W'($urandom);
        src[i] = i;
      end
      swap = '0;
      for (int j = 0; j < M - 1; j++)
        if ((j == 0 || !swap[j-1]) && ($urandom % 2)) begin
          swap[j] = 1'b1;
          src[j] = j + 1;
          src[j+1] = j;
          n_swapped++;
        end
      #1;
      for (int i = 0; i < M; i++)
        check(dout[i] == din[src[i]], $sformatf("channel %0d swap %b", i, swap));
    end
    check(n_swapped > 0, "swaps occurred");
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
