// Timing-skew calibration processor of the M-channel interleaved converter.
//
// Two random sequences p[k] and q[k] chop the clocks of adjacent channel pairs: p acts on the
// pairs (1,2), (3,4), ... and q on the pairs (2,3), (4,5), ... (1-based channel numbers).
// Because a channel may belong to only one exchanged pair at a time, the two sets take
// turns: even frames apply p, odd frames apply q.  swap_now drives the clock chopper for the
// frame being sampled; swap_dly is the same word delayed by LAT frames and drives the data
// chopper, so the words x_j reach this block back in time order.
// For each pair (j, j+1) a zero-crossing detector flags z = 1 when the two samples lie on
// opposite sides of mid-scale (MSBs differ).  In the frames where the pair was chopped, a
// calibration processor correlates z with the pair's chopping sign and drives the delay
// code T_{j+1} of the later channel; channel 1 is the timing reference (code 0).
// Follows the document: choppers driven by random sequences, zero-crossing detection, the
// calibration processor with threshold N_C, T_{j+1} controlling tau_{j+1}.  Own choices: the
// alternating use of p and q, the LFSR, mid-scale as zero, LAT = 2 to match the channels.
module skew_cal_processor
  import tiadc_pkg::*;
#(
  parameter int unsigned M   = M_CH,
  parameter int unsigned N   = N_BITS,
  parameter int unsigned NC  = NC_SKEW,
  parameter int unsigned TW  = TW_DEF,
  parameter int unsigned LAT = 2          // frames from swap_now to matching x
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [M-1:0][N-1:0]         x,          // channel words in time order
  output logic [M-2:0]                swap_now,   // to the clock chopper
  output logic [M-2:0]                swap_dly,   // to the data chopper
  output logic [M-1:0][TW-1:0]        tcode,      // delay codes T_j (signed)
  output logic [M-2:0]                s_pos,      // BPD events (observability)
  output logic [M-2:0]                s_neg,
  output logic [M-2:0]                zc          // zero-crossing flags of this cycle
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [30:0]  lfsr;
  logic         phase;                    // 0: p frame, 1: q frame
  logic         p_neg, q_neg;
  logic [M-2:0] act_now;
  logic [M-2:0] swap_pipe [LAT];
  logic [LAT-1:0] ph_pipe;                // frame phase, delayed with the swap word
  logic [LAT-1:0] vld_pipe;               // 0 until LAT frames after reset
  logic [M-2:0] act_dly;

  lfsr_seq #(.W(31), .TAP_A(31), .TAP_B(28), .SEED(31'h2b1c_0e55)) u_lfsr (
    .clk, .rst_n, .en(1'b1), .state(lfsr)
  );
  assign p_neg = lfsr[0];
  assign q_neg = lfsr[15];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= 1'b0;
    else        phase <= ~phase;
  end

  always_comb begin
    for (int j = 0; j < int'(M) - 1; j++) begin
      act_now[j]  = (j % 2 == 0) ? !phase : phase;
      swap_now[j] = act_now[j] && ((j % 2 == 0) ? p_neg : q_neg);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(LAT); i++) begin
        swap_pipe[i] <= '0;
      end
      ph_pipe  <= '0;
      vld_pipe <= '0;
    end else begin
      swap_pipe[0] <= swap_now;
      for (int i = 1; i < int'(LAT); i++) begin
        swap_pipe[i] <= swap_pipe[i-1];
      end
      ph_pipe  <= LAT'({ph_pipe, phase});
      vld_pipe <= LAT'({vld_pipe, 1'b1});
    end
  end

  // The delayed word is masked with the delayed phase, so two adjacent pairs are never
  // exchanged together, whatever the registers hold before the first reset.
  always_comb begin
    for (int j = 0; j < int'(M) - 1; j++)
      act_dly[j] = vld_pipe[LAT-1] && ((j % 2 == 0) ? !ph_pipe[LAT-1] : ph_pipe[LAT-1]);
  end
  assign swap_dly = swap_pipe[LAT-1] & act_dly;

  assign tcode[0] = '0;
  for (genvar j = 0; j < int'(M) - 1; j++) begin : g_pair
    bpd_e s;
    logic signed [TW-1:0] t;
    assign zc[j] = x[j][N-1] ^ x[j+1][N-1];
    cal_processor #(.NC(NC), .TW(TW)) u_cp (
      .clk, .rst_n, .en(act_dly[j]), .d(zc[j]), .q_pos(!swap_dly[j]),
      .r(), .s(s), .t(t)
    );
    assign tcode[j+1] = t;
    assign s_pos[j]   = (s == S_POS);
    assign s_neg[j]   = (s == S_NEG);
  end
endmodule
