// Self-checking test of ti_mux with 8 channels: a channel clock clk (period 80) and a
// full-rate clock clk_fs (period 10, edges 3 after the clk edges).  Random frames are
// presented with a toggling frame_tgl; each frame must come out in channel order 0..7, one
// word per clk_fs edge, eight words per frame, starting on the first clk_fs edge.
module tb_ti_mux;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int M = 8;
  localparam int N = 6;
  logic clk = 1'b0, clk_fs = 1'b0, rst_n = 1'b0, frame_tgl = 1'b0, valid;
  logic [M-1:0][N-1:0] x_par;
  logic [N-1:0] x_ser;
  logic [2:0] slot;
  int checks = 0, failures = 0;
  int nwords = 0, nframes = 0, exp_slot = 0;

  ti_mux #(.M(M), .N(N)) dut (.clk_fs, .rst_n, .frame_tgl, .x_par, .x_ser, .slot, .valid);

  initial forever #40 clk = ~clk;
  initial begin
    #3;
    forever begin
      clk_fs = 1'b1;
      #5;
      clk_fs = 1'b0;
      #5;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    frame_tgl <= ~frame_tgl;
    for (int i = 0; i < M; i++) x_par[i] <= N'($urandom);
  end

  bit started = 1'b0;
  always @(negedge clk_fs) if (rst_n && valid && slot == 0) started = 1'b1;
  always @(negedge clk_fs) if (started) begin
    check(valid, "valid on every clk_fs edge");
    check(int'(slot) == exp_slot, $sformatf("slot %0d expected %0d", slot, exp_slot));
    check(x_ser == x_par[slot], "word in channel order");
    nwords++;
    exp_slot = (exp_slot + 1) % M;
  end
  always @(negedge clk) if (rst_n) nframes++;

  initial begin
    x_par = '0;
    #100 rst_n = 1'b1;
    wait (nframes == 500);
    @(posedge clk);
    check(nwords >= M * (nframes - 2) && nwords % M == 0,
          $sformatf("%0d words in %0d frames", nwords, nframes));
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
