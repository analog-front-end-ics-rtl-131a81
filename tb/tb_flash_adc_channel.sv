// Self-checking test of one flash A/D channel (6 bits, NC = 8, comparator mismatch up to
// +/- 1 LSB).  The channel clock runs at 2 GHz and the sampling clock pulses 100 ps after
// each channel-clock edge; the input is an asynchronous 0.9 GHz sine of 30 LSB amplitude on a
// 2 ps grid.  Each output code is compared with the ideal quantization floor(v) of the input
// at its sampling instant two channel-clock edges earlier (this checks the latency of 2).
// After the background calibration has settled, at least 80% of the codes must be exact (the chopped comparators
// keep a residual offset dither of about a trim step) and
// none may be off by more than 1 LSB; the offsets of the comparators inside the input swing
// must end within 0.5 LSB, and the error rate must have dropped.
module tb_flash_adc_channel;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int  N  = 6;
  localparam int  L  = 63;
  localparam int  TW = 6;
  localparam real PI = 3.14159265358979;
  localparam int  CYCLES = 60000;
  localparam int  SETTLE = 40000;

  logic clk = 1'b0, rst_n = 1'b0, ck = 1'b0;
  real  vin;
  logic [N-1:0] code;
  logic [L-1:0][TW-1:0] trim;
  logic [L-1:0] s_pos, s_neg;

  int checks = 0, failures = 0;
  int cyc = 0;
  int ideal [3];
  int n_exact_late = 0, n_late = 0, n_wrong_early = 0, n_wrong_late = 0, n_far = 0;
  real vos [L];

  flash_adc_channel #(.N(N), .NC(8), .TW(TW), .OS_MAX(1.0), .OS_SEED(5)) dut (.*);

  for (genvar i = 0; i < L; i++) begin : g_obs
    assign vos[i] = dut.g_cmp[i].u_rcc.vos;
  end

  function automatic real xin(real t);
    return 32.0 + 30.0 * $sin(2.0 * PI * 0.9137e-3 * t);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  always #250 clk = ~clk;
  initial forever begin
    vin = xin($realtime);
    #2.0;
  end

  always @(posedge clk) begin
    #100.0;
    ck = 1'b1;
    #15.0;
    ck = 1'b0;
  end

  always @(posedge clk) if (rst_n) begin
    int c, err;
    #1;
    cyc++;
    c = int'($floor(xin($realtime - 1.0 + 100.0)));
    c = (c < 0) ? 0 : (c > L) ? L : c;
    if (cyc > 3) begin
      err = int'(code) - ideal[1];
      if (cyc < 2000 && err != 0) n_wrong_early++;
      if (cyc > SETTLE) begin
        n_late++;
        if (err == 0) n_exact_late++; else n_wrong_late++;
        if (err > 1 || err < -1) n_far++;
      end
    end
    ideal[2] = ideal[1];
    ideal[1] = ideal[0];
    ideal[0] = c;
  end

  initial begin
    real vmax;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (cyc == CYCLES);
    vmax = 0.0;
    for (int i = 3; i < 60; i++) begin
      if (vos[i] > vmax) vmax = vos[i];
      if (-vos[i] > vmax) vmax = -vos[i];
    end
    $display("exact %0d of %0d after settling, off by >1 LSB %0d, wrong early %0d of ~2000, largest offset %0.3f LSB",
             n_exact_late, n_late, n_far, n_wrong_early, vmax);
    check(n_exact_late * 10 >= n_late * 8, "at least 80% exact codes after settling");
    check(n_far == 0, "no code off by more than 1 LSB after settling");
    check(vmax <= 0.5, "comparator offsets within 0.5 LSB");
    check(real'(n_wrong_late) / n_late < real'(n_wrong_early) / 1996.0, "error rate drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(500.0 * (CYCLES + 100));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
