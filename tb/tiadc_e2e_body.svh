// Shared body of the end-to-end testbenches of tiadc_top.  The including module declares
// the localparams M, N, L, TW, NCB, NCS, ROUTE_MAX, OS_MAX, CYCLES, SETTLE, F_IN_GHZ and
// the instance `dut` of tiadc_top connected to clk_ref, rst_n, vin, clk_fs, x_par, x_ser,
// x_slot, x_valid and tcode.
//
// Stimulus: a 2 GHz channel clock and an asynchronous sine of amplitude 30 LSB around
// mid-scale, given to the converter as a piecewise-linear waveform on a 2 ps grid.
// Checks, all against values computed here from the stimulus:
//   * after SETTLE cycles fewer than 2% of the output words lie more than 2 LSB from the
//     ideal quantization of the input at its nominal sampling instant, and the RMS error has
//     fallen below 1 LSB and below the RMS error of the first frames;
//   * the effective offset of every comparator inside the input swing ends within 0.75 LSB,
//     and the RMS skew between neighbouring channels, averaged after SETTLE, is within 1.5
//     delay steps (the loops dither by about one step);
//   * the multiplexer emits exactly M words per channel-clock cycle, in channel order;
//   * each mechanism happened: clock/data chopping in p frames and in q frames, positive and
//     negative BPD decisions in the comparator loops and in the skew loop.

localparam real TC    = 500.0;
localparam real TS    = TC / M;
localparam real STEP  = 2.0;
localparam real AMP   = 30.0;
localparam real MID   = 32.0;
localparam real PI    = 3.14159265358979;
localparam real MU    = TS / 28.0;
// Comparators whose reference lies inside the input swing; the others see no signal
// crossing and keep their initial offset.
localparam int  CMP_LO = 4;
localparam int  CMP_HI = 60;

int checks = 0, failures = 0;
int cyc = 0;
int words_in_cycle = 0;
int n_mux_words = 0;
int n_p_swap = 0, n_q_swap = 0;
int n_cmp_pos = 0, n_cmp_neg = 0, n_skw_pos = 0, n_skw_neg = 0;
int n_big_err = 0;
real se_early = 0.0, se_late = 0.0;
int  n_early = 0, n_late = 0;
real vos_init_max = 0.0;
real ss_skew = 0.0;
int  n_skew = 0;

function automatic real fabs(real v);
  return (v < 0.0) ? -v : v;
endfunction

function automatic real xin(real t_ps);
  return MID + AMP * $sin(2.0 * PI * F_IN_GHZ * 1.0e-3 * t_ps + 0.3);
endfunction

function automatic int ideal_code(real v);
  int c;
  c = int'($floor(v));
  if (c < 0) c = 0;
  if (c > L) c = L;
  return c;
endfunction

task automatic check(input bit ok, input string what);
  checks++;
  if (!ok) begin
    failures++;
    if (failures <= 10) $display("FAIL: %s", what);
  end
endtask

// Clock and input.
initial begin
  clk_ref = 1'b0;
  forever #(TC / 2.0) clk_ref = ~clk_ref;
end
initial begin
  vin = MID;
  forever begin
    vin = xin($realtime);
    #(STEP);
  end
end

// Observation of internal state (behavioural models and calibration processors).
real vos   [M][L];
real tau   [M];
logic [M-1:0][L-1:0] cmp_sp, cmp_sn;
for (genvar j = 0; j < M; j++) begin : g_obs
  assign tau[j]    = dut.g_ch[j].u_dly.tau_ps;
  assign cmp_sp[j] = dut.g_ch[j].u_adc.s_pos;
  assign cmp_sn[j] = dut.g_ch[j].u_adc.s_neg;
  for (genvar i = 0; i < L; i++) begin : g_c
    assign vos[j][i] = dut.g_ch[j].u_adc.g_cmp[i].u_rcc.vos;
  end
end

// Mechanism counters, on the channel clock.
always @(posedge clk_ref) if (rst_n) begin
  cyc <= cyc + 1;
  if (dut.u_skew.swap_now[0]) n_p_swap++;
  if (dut.u_skew.swap_now[1]) n_q_swap++;
  n_skw_pos += $countones(dut.u_skew.s_pos);
  n_skw_neg += $countones(dut.u_skew.s_neg);
  for (int j = 0; j < M; j++) begin
    n_cmp_pos += $countones(cmp_sp[j]);
    n_cmp_neg += $countones(cmp_sn[j]);
  end
end

// Output words against the ideal quantizer.  At the falling edge x_par holds the frame
// sampled in the channel-clock period that began two rising edges earlier.
always @(negedge clk_ref) if (rst_n && cyc > 4) begin
  real t0, err;
  int  ic;
  t0 = $realtime - TC / 2.0 - 2.0 * TC;
  for (int j = 0; j < M; j++) begin
    ic  = ideal_code(xin(t0 + TS / 2.0 - 20.0 + tau[0] + j * TS));
    err = real'(int'(x_par[j]) - ic);
    if (cyc < 4 + 40) begin
      se_early += err * err;
      n_early++;
    end
    if (cyc > SETTLE) begin
      if (j > 0) begin
        ss_skew += (tau[j] - tau[j-1]) * (tau[j] - tau[j-1]);
        n_skew++;
      end
      se_late += err * err;
      n_late++;
      if (err > 2.0 || err < -2.0) n_big_err++;
    end
  end
  if (cyc > 5) begin
    check(words_in_cycle == M, $sformatf("cycle %0d: %0d multiplexer words", cyc, words_in_cycle));
  end
  words_in_cycle = 0;
end

// Multiplexer output, sampled while stable.
always @(negedge clk_fs) if (rst_n && x_valid) begin
  words_in_cycle++;
  n_mux_words++;
  if (cyc > 5)
    check(x_ser == x_par[x_slot], $sformatf("mux slot %0d word %0d, frame word %0d",
                                            x_slot, x_ser, x_par[x_slot]));
end

initial begin
  rst_n = 1'b0;
  #(3.0 * TC + 10.0);
  for (int j = 0; j < M; j++)
    for (int i = 0; i < L; i++)
      if (fabs(vos[j][i]) > vos_init_max) vos_init_max = fabs(vos[j][i]);
  rst_n = 1'b1;
  wait (cyc == CYCLES);
  @(negedge clk_ref);
  begin
    real rms_e, rms_l, vmax, smax, nmax, s0;
    rms_e = $sqrt(se_early / n_early);
    rms_l = $sqrt(se_late / n_late);
    vmax = 0.0;
    for (int j = 0; j < M; j++)
      for (int i = CMP_LO - 1; i < CMP_HI; i++)
        if (fabs(vos[j][i]) > vmax) vmax = fabs(vos[j][i]);
    smax = 0.0;
    nmax = 0.0;
    for (int j = 1; j < M; j++) begin
      s0 = tau[j] - tau[0];
      if (fabs(s0) > smax) smax = fabs(s0);
      s0 = tau[j] - tau[j-1];
      if (fabs(s0) > nmax) nmax = fabs(s0);
    end
    $display("rms error first frames %0.3f LSB, after settling %0.3f LSB, words off by >2 LSB %0d",
             rms_e, rms_l, n_big_err);
    $display("rms neighbour skew after settling %0.3f ps (delay step %0.3f ps)",
             $sqrt(ss_skew / n_skew), MU);
    $display("comparator offset max %0.3f LSB (initial %0.3f), channel skew max %0.3f ps (neighbours %0.3f ps)",
             vmax, vos_init_max, smax, nmax);
    $display("events: p-swaps %0d q-swaps %0d cmp S+ %0d S- %0d skew S+ %0d S- %0d mux words %0d",
             n_p_swap, n_q_swap, n_cmp_pos, n_cmp_neg, n_skw_pos, n_skw_neg, n_mux_words);
    for (int j = 0; j < M; j++) $write("%0d ", $signed(tcode[j]));
    $display(" <- delay codes");
    check(n_big_err * 50 < n_late, "under 2% of words more than 2 LSB from ideal after settling");
    check(rms_l < 1.0, "rms error after settling below 1 LSB");
    check(rms_l < rms_e, "rms error falls during calibration");
    check(vmax <= 0.75, "comparator offsets within 0.75 LSB");
    check($sqrt(ss_skew / n_skew) <= 1.5 * MU, "rms neighbour skew after settling within 1.5 delay steps");
    check(smax < ROUTE_MAX * 2.0 + 4.0 * MU, "no runaway of the delay codes");
    check(n_p_swap > 0, "p-frame chopping happened");
    check(n_q_swap > 0, "q-frame chopping happened");
    check(n_cmp_pos > 0 && n_cmp_neg > 0, "comparator BPD fired both ways");
    check(n_skw_pos > 0 && n_skw_neg > 0, "skew BPD fired both ways");
    check(n_mux_words >= M * (CYCLES - 10), "multiplexer ran at M words per cycle");
  end
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end

// Watchdog.
initial begin
  #(TC * (CYCLES + 200));
  failures++;
  $display("watchdog expired");
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
