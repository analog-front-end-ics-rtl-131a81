// One A/D channel of the interleaved converter: an N-bit flash ADC with windowed
// background-calibrated comparators.  Behavioural model (analog front, not synthesizable)
// around the synthesizable digital part flash_bcc_digital.
//
// The SHA samples vin on each rising edge of the channel sampling clock ck.  2^N - 1 random
// chopping comparators compare the held value with the ladder references V_R,j = j LSB
// (input range 0 .. 2^N LSB, mid-scale 2^(N-1)) and deliver de-chopped decisions.  The
// digital part, clocked by the channel clock clk, captures the decisions, encodes them
// through the thermometer-code edge detector and calibrates every comparator's offset in the
// background, without interrupting conversion.
// Comparator mismatch: comparator j gets the fixed offset VOS0 = OS_MAX * h(OS_SEED, j) with
// h a hash spread evenly over [-1, 1]; this stands in for device mismatch.
// Timing: ck must rise once between consecutive rising edges of clk, and the decision must be
// complete before the next clk edge; code appears two clk edges after the sample.
module flash_adc_channel
  import tiadc_pkg::*;
#(
  parameter int unsigned N        = N_BITS,
  parameter int unsigned NC       = NC_BCC,
  parameter int unsigned TW       = TW_DEF,
  parameter real         DV       = DV_LSB,
  parameter real         OS_MAX   = 1.0,          // largest comparator mismatch, LSB
  parameter int unsigned OS_SEED  = 1,
  parameter real         STEP_PS  = 2.0,          // breakpoint grid of vin
  localparam int unsigned L       = (1 << N) - 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ck,
  input  real                  vin,
  output logic [N-1:0]         code,
  output logic [L-1:0][TW-1:0] trim,
  output logic [L-1:0]         s_pos,
  output logic [L-1:0]         s_neg
);
  timeunit 1ps;
  timeprecision 1fs;

  // 32-bit integer hash of (seed, j).
  function automatic logic [31:0] mix32(int unsigned seed, int unsigned j);
    logic [31:0] h;
    h = 32'(seed) * 32'h9e37_79b9 ^ 32'(j) * 32'h85eb_ca6b;
    h = h ^ (h >> 15);
    h = h * 32'hc2b2_ae35;
    h = h ^ (h >> 13);
    return h;
  endfunction

  // Integer hash giving a value in [0, 2000].
  function automatic int unsigned os_hash(int unsigned seed, int unsigned j);
    return int'(mix32(seed, j) % 32'd2001);
  endfunction

  real          vs;
  logic         hold;
  logic [L-1:0] dc, q_pos;

  sha_model #(.STEP_PS(STEP_PS)) u_sha (.ck(ck), .vin(vin), .vout(vs), .hold(hold));

  for (genvar j = 0; j < int'(L); j++) begin : g_cmp
    rcc_model #(
      .TW(TW), .VREF(real'(j + 1)), .DV(DV),
      .VOS0(OS_MAX * (real'(os_hash(OS_SEED, j)) - 1000.0) / 1000.0)
    ) u_rcc (
      .latch(hold), .vs(vs), .q_pos(q_pos[j]), .trim(trim[j]), .dc(dc[j])
    );
  end

  flash_bcc_digital #(
    .N(N), .NC(NC), .TW(TW), .Q_SEED(63'({mix32(OS_SEED, 1001), mix32(OS_SEED, 1002)}) | 63'h1)
  ) u_dig (
    .clk, .rst_n, .dc, .q_pos, .trim, .code, .s_pos, .s_neg
  );
endmodule
