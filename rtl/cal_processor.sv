// Calibration processor (CP) shared by the comparator-offset loop and the timing-skew loop.
//
// Each cycle with en = 1 the correlator forms U[k] = q[k] * d[k], where d is the detected
// event (comparator output, edge-code bit or zero-crossing flag) and q = +1 when q_pos = 1.
// ACC1 accumulates U into R[k].  The bilateral peak detector (BPD) compares R[k] with the
// thresholds +NC and -NC: S[k] = +1 when R >= NC, -1 when R <= -NC, else 0.  Whenever S is
// non-zero ACC1 is cleared instead of accumulating.  ACC2 integrates S into the trim code
// T[k], which sets the comparator offset or the channel delay.  This follows the document.
// Own choices: S is decoded combinationally from the registered R, ACC2 saturates at the
// ends of its TW-bit signed range, en = 0 freezes ACC1, and reset clears both accumulators.
// Timing: R and T are registers; T changes on the clock edge after R reaches a threshold.
module cal_processor
  import tiadc_pkg::*;
#(
  parameter int unsigned NC = NC_BCC,   // BPD threshold
  parameter int unsigned TW = 6,        // ACC2 width (two's complement)
  localparam int unsigned RW = $clog2(NC + 1) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,      // a valid observation this cycle
  input  logic                 d,       // observed event, 1 = occurred
  input  logic                 q_pos,   // chopping state: 1 -> q = +1, 0 -> q = -1
  output logic signed [RW-1:0] r,       // ACC1 output R[k]
  output bpd_e                 s,       // BPD output S[k]
  output logic signed [TW-1:0] t        // ACC2 output T[k]
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam logic signed [RW-1:0] NC_P = RW'(NC);
  localparam logic signed [RW-1:0] NC_N = -RW'(NC);
  localparam logic signed [TW-1:0] T_MAX = {1'b0, {(TW-1){1'b1}}};
  localparam logic signed [TW-1:0] T_MIN = {1'b1, {(TW-1){1'b0}}};

  logic signed [RW-1:0] u;

  always_comb begin
    if (r >= NC_P)      s = S_POS;
    else if (r <= NC_N) s = S_NEG;
    else                s = S_ZERO;
  end

  always_comb begin
    if (en && d) u = q_pos ? RW'(1) : -RW'(1);
    else         u = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0;
      t <= '0;
    end else begin
      unique case (s)
        S_POS: begin
          r <= '0;
          if (t != T_MAX) t <= t + TW'(1);
        end
        S_NEG: begin
          r <= '0;
          if (t != T_MIN) t <= t - TW'(1);
        end
        default: r <= r + u;
      endcase
    end
  end

  // ACC1 never leaves [-NC, +NC]: it is cleared as soon as it reaches a threshold.
  a_acc1_range: assert property (@(posedge clk) disable iff (!rst_n) (r <= NC_P) && (r >= NC_N));
endmodule
