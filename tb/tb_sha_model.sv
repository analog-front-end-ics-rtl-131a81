// Self-checking test of the sample-and-hold model: the input is a piecewise-linear waveform
// on a 2 ps grid whose breakpoints follow v(t) = 5 + 0.01 * t + 3 * sin(t / 40) (t in ps);
// sampling edges at random instants must hold the linear interpolation between the two
// breakpoints around the edge (computed here), and each sample must pulse hold.
module tb_sha_model;
  timeunit 1ps;
  timeprecision 1fs;

  logic ck = 1'b0, hold;
  real vin, vout;
  int checks = 0, failures = 0, n_hold = 0;

  sha_model #(.STEP_PS(2.0)) dut (.*);

  function automatic real vgrid(real t);
    return 5.0 + 0.01 * t + 3.0 * $sin(t / 40.0);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial forever begin
    vin = vgrid($realtime);
    #2.0;
  end

  always @(posedge hold) n_hold++;

  initial begin
    real ts, tl, expv;
    #10.0;
    for (int k = 0; k < 500; k++) begin
      #(20.0 + real'($urandom % 10000) / 1000.0);
      ts = $realtime;
      ck = 1'b1;
      #8.0;
      ck = 1'b0;
      tl = 2.0 * $floor(ts / 2.0);
      expv = vgrid(tl) + (vgrid(tl + 2.0) - vgrid(tl)) * (ts - tl) / 2.0;
      check(vout - expv < 1.0e-6 && expv - vout < 1.0e-6,
            $sformatf("t %0.3f held %0.6f expected %0.6f", ts, vout, expv));
    end
    check(n_hold == 500, "one hold pulse per sample");
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
