// Digital part of one flash A/D channel with windowed background-calibrated comparators.
//
// The 2^N - 1 random chopping comparators (RCCs) deliver de-chopped decisions dc once per
// channel clock.  This block
//   * generates the chopping sequences q_j[k] for the comparators (one LFSR, one bit each),
//   * registers dc together with the q_j that was in force while it was decided,
//   * forms the edge code with the TCED and encodes it to the N-bit output code,
//   * runs one calibration processor per comparator on (edge bit, q_j), whose ACC2 code
//     trim[j] sets that comparator's offset.
// The windowed arrangement (CP fed by the edge code, not by dc) follows the document.
// Own choices: the LFSR, the two-stage pipeline and the register placement.  Q_SEED must be
// a dense word: a two-tap shift register started from a sparse state (such as 1) emits a
// long run of nearly constant bits, which biases the chopping and stalls the calibration.
// Timing: q changes on every clock edge and must be applied to the comparator decision made
// before the next edge.  The decision is captured at the following edge (stage 1); the code
// and the trim update appear one edge later (stage 2), so code lags the sample by two edges.
module flash_bcc_digital
  import tiadc_pkg::*;
#(
  parameter int unsigned N       = N_BITS,
  parameter int unsigned NC      = NC_BCC,
  parameter int unsigned TW      = TW_DEF,
  parameter logic [62:0] Q_SEED  = 63'h2d3f_8a61_c5e9_17b4,
  localparam int unsigned L      = (1 << N) - 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [L-1:0]                dc,      // de-chopped comparator outputs
  output logic [L-1:0]                q_pos,   // chopping sequences to the RCCs, 1 -> +1
  output logic [L-1:0][TW-1:0]        trim,    // offset trim codes T_j (signed)
  output logic [N-1:0]                code,    // channel output D_o
  output logic [L-1:0]                s_pos,   // BPD fired +1 this cycle (observability)
  output logic [L-1:0]                s_neg    // BPD fired -1 this cycle
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [62:0]  lfsr;
  logic [L-1:0] dc_r, q_r, de;
  logic [N-1:0] code_c;

  lfsr_seq #(.W(63), .TAP_A(63), .TAP_B(62), .SEED(Q_SEED)) u_lfsr (
    .clk, .rst_n, .en(1'b1), .state(lfsr)
  );
  assign q_pos = lfsr[L-1:0];

  // Stage 1: decision of the previous sample and the chopping state it was taken with.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dc_r <= '0;
      q_r  <= '0;
    end else begin
      dc_r <= dc;
      q_r  <= q_pos;
    end
  end

  tced #(.L(L)) u_tced (.dc(dc_r), .de(de));
  edge_encoder #(.N(N)) u_enc (.de(de), .code(code_c));

  // Stage 2: output code.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) code <= '0;
    else        code <= code_c;
  end

  for (genvar j = 0; j < int'(L); j++) begin : g_cp
    bpd_e s;
    logic signed [TW-1:0] t;
    cal_processor #(.NC(NC), .TW(TW)) u_cp (
      .clk, .rst_n, .en(1'b1), .d(de[j]), .q_pos(q_r[j]), .r(), .s(s), .t(t)
    );
    assign trim[j]  = t;
    assign s_pos[j] = (s == S_POS);
    assign s_neg[j] = (s == S_NEG);
  end
endmodule
