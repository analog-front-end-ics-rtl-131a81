// Self-checking test of flash_bcc_digital (6 bits, 63 comparators, NC = 8 to shorten the
// run).  The comparators are modelled here in integer quarter-LSB units: comparator j
// (reference j LSB) has a random offset o_j in [-4, +4] quarter LSB and a trim step of one
// quarter LSB, chopped by the q_j the block supplies:
//   effective offset e_j = o_j - trim_j,  dc_j = 1 when 4*v - 4*j > -q_j * e_j (q_j = +1),
//                                         or when 4*v - 4*j >= e_j (q_j = -1).
// The input v is uniform over the full range.  Checked: the output code equals the encoding
// of the comparator word taken two clock edges earlier (latency 2), and at the end the
// comparator offsets have settled (below); BPD events of both signs
// must have occurred.  The windowed loop leaves each comparator dithering around zero offset;
// the test asks for an RMS residual of at most one trim step and no comparator beyond two.
module tb_flash_bcc_digital;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int N = 6;
  localparam int L = 63;
  localparam int TW = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [L-1:0] dc, q_pos, s_pos, s_neg;
  logic [L-1:0][TW-1:0] trim;
  logic [N-1:0] code;
  int checks = 0, failures = 0;
  int off [L];
  int exp_code [3];
  int n_pos = 0, n_neg = 0;

  flash_bcc_digital #(.N(N), .NC(8), .TW(TW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic int tv(logic [TW-1:0] w);
    logic signed [TW-1:0] sw;
    sw = w;
    return int'(sw);
  endfunction

  function automatic int enc(logic [L-1:0] w);
    int c = 0;
    for (int i = 0; i < L; i++)
      if (w[i] && (i == L - 1 || !w[i+1])) c |= i + 1;
    return c;
  endfunction

  initial begin
    int v4, e, worst;
    int ss_fin = 0, ss_ini = 0;
    for (int j = 0; j < L; j++) off[j] = int'($urandom % 9) - 4;
    dc = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 200000; k++) begin
      v4 = int'($urandom % 256);          // input in quarter LSB, 0 .. 63.75 LSB
      for (int j = 0; j < L; j++) begin
        e = off[j] - tv(trim[j]);
        if (q_pos[j]) dc[j] = (v4 - 4 * (j + 1)) > -e;
        else          dc[j] = (v4 - 4 * (j + 1)) >= e;
      end
      exp_code[2] = exp_code[1];
      exp_code[1] = exp_code[0];
      exp_code[0] = enc(dc);
      @(posedge clk);
      #1;
      n_pos += $countones(s_pos);
      n_neg += $countones(s_neg);
      if (k >= 2) check(int'(code) == exp_code[1], $sformatf("code %0d expected %0d", code, exp_code[1]));
    end
    worst = 0;
    for (int j = 0; j < L; j++) begin
      e = off[j] - tv(trim[j]);
      ss_fin += e * e;
      ss_ini += off[j] * off[j];
      if (e < 0) e = -e;
      if (e > worst) worst = e;
      check(e <= 2, $sformatf("comparator %0d offset %0d trim %0d", j + 1, off[j], tv(trim[j])));
    end
    $display("residual offset rms %0.3f (initial %0.3f) max %0d quarter LSB, S+ %0d S- %0d",
             $sqrt(real'(ss_fin) / L), $sqrt(real'(ss_ini) / L), worst, n_pos, n_neg);
    check(ss_fin * 4 < ss_ini, "offset power reduced at least fourfold");
    check(ss_fin <= L, "rms residual offset at most one trim step");
    check(n_pos > 0 && n_neg > 0, "BPD fired both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 210000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
