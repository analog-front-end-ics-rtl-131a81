// Self-checking test of skew_cal_processor (8 channels, 6 bits, default NC = 29).
// The converter around it is modelled here: ADC i has a clock-route delay r_i (random, +/- 8 ps) plus its
// delay-unit setting -mu_t * T_i (mu_t = 62.5/28 ps).  In each frame the swap word from the
// block decides which time slot every ADC samples (exchanged pairs trade slots); each ADC
// quantizes an asynchronous 3.1 GHz sine at its slot time plus its delay, and the words are
// handed back in time order two frames later, as the data chopper would.
// Checked: swap_dly is swap_now two frames later; exchanges alternate between the p pairs
// and the q pairs and never overlap; the zero-crossing flags match the word MSBs; channel 1
// keeps code 0; averaged after settling, the RMS skew between neighbouring channels is at
// most 1.5 delay steps and under half of its initial value.
module tb_skew_cal_processor;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int  M  = 8;
  localparam int  N  = 6;
  localparam int  TW = 6;
  localparam real TS = 62.5;
  localparam real MU = TS / 28.0;
  localparam real PI = 3.14159265358979;
  localparam int  CYCLES = 200000;
  localparam int  SETTLE = 100000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [M-1:0][N-1:0]  x;
  logic [M-2:0]         swap_now, swap_dly, s_pos, s_neg, zc;
  logic [M-1:0][TW-1:0] tcode;

  int checks = 0, failures = 0;
  real route [M];
  logic [M-1:0][N-1:0] frame_q [2];
  logic [M-2:0]        swap_hist [3];
  int  n_p = 0, n_q = 0, n_pos = 0, n_neg = 0;
  real ss_init = 0.0, ss_late = 0.0;
  int  n_late = 0;

  skew_cal_processor #(.M(M), .N(N), .TW(TW), .LAT(2)) dut (.*);

  always #250 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic real dly(int i);
    logic signed [TW-1:0] t;
    t = tcode[i];
    return route[i] - MU * real'(t);
  endfunction

  function automatic int quant(real t_ps);
    real v;
    int  c;
    v = 32.0 + 30.0 * $sin(2.0 * PI * 3.1416e-3 * t_ps);
    c = int'($floor(v));
    return (c < 0) ? 0 : (c > 63) ? 63 : c;
  endfunction

  function automatic real nb_skew2();
    real s = 0.0;
    for (int j = 1; j < M; j++) s += (dly(j) - dly(j-1)) ** 2;
    return s / (M - 1);
  endfunction

  initial begin
    for (int i = 0; i < M; i++) route[i] = (real'($urandom % 1601) - 800.0) / 100.0;
    x = '0;
    frame_q[0] = '0;
    frame_q[1] = '0;
    for (int i = 0; i < 3; i++) swap_hist[i] = '0;
    ss_init = nb_skew2();
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < CYCLES; k++) begin
      int slot_of [M];
      logic [M-1:0][N-1:0] fr;
      @(posedge clk);
      #1;
      // Checks on the control words.
      if (k >= 3) check(swap_dly == swap_hist[1], "swap_dly is swap_now two frames later");
      for (int j = 0; j < M - 2; j++) check(!(swap_now[j] && swap_now[j+1]), "no overlap");
      if (swap_now[0]) n_p++;
      if (swap_now[1]) n_q++;
      check((swap_now & 7'b1010101) == 0 || (swap_now & 7'b0101010) == 0, "p and q frames alternate");
      for (int j = 0; j < M - 1; j++) check(zc[j] == (x[j][N-1] ^ x[j+1][N-1]), "zero-crossing flag");
      check(tcode[0] == '0, "channel 1 is the reference");
      n_pos += $countones(s_pos);
      n_neg += $countones(s_neg);
      if (k > SETTLE) begin
        ss_late += nb_skew2();
        n_late++;
      end
      // This frame: which slot each ADC samples, in time order after the data chopper.
      for (int i = 0; i < M; i++) slot_of[i] = i;
      for (int j = 0; j < M - 1; j++)
        if (swap_now[j]) begin
          slot_of[j] = j + 1;
          slot_of[j+1] = j;
        end
      for (int i = 0; i < M; i++)
        fr[slot_of[i]] = N'(quant(real'(k) * 500.0 + slot_of[i] * TS + dly(i)));
      x = frame_q[1];
      frame_q[1] = frame_q[0];
      frame_q[0] = fr;
      swap_hist[2] = swap_hist[1];
      swap_hist[1] = swap_hist[0];
      swap_hist[0] = swap_now;
    end
    $display("rms neighbour skew: initial %0.3f ps, after settling %0.3f ps; p %0d q %0d S+ %0d S- %0d",
             $sqrt(ss_init), $sqrt(ss_late / n_late), n_p, n_q, n_pos, n_neg);
    check($sqrt(ss_late / n_late) <= 1.5 * MU, "settled skew within 1.5 steps");
    check(ss_late / n_late < ss_init / 4.0, "skew at least halved");
    check(n_p > 0 && n_q > 0, "both pair sets chopped");
    check(n_pos > 0 && n_neg > 0, "BPD fired both ways");
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
