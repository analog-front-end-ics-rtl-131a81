// Time-interleaved flash ADC with background offset and timing-skew calibration.
//
// M flash A/D channels sample the same input vin in turn, each at f_c, so the array samples
// at f_s = M * f_c (defaults: 8 channels, 6 bits, 2 GHz each, 16 GS/s).  Two background loops
// keep the channels accurate without interrupting conversion:
//   * inside every channel, each comparator is randomly chopped and a calibration processor
//     trims its offset (flash_adc_channel / flash_bcc_digital);
//   * across channels, the clock chopper exchanges the sampling phases of adjacent pairs at
//     random, the data chopper puts the results back in time order, and the skew calibration
//     processor watches the zero crossings between neighbours and trims each channel's delay
//     unit (skew_cal_processor, pair_chopper, delay_unit_model).
// The multiplexer serialises each frame x_1..x_M into the full-rate output x_ser.
// Structure (clock generator -> clock choppers -> delay units -> channels -> data choppers ->
// zero-crossing detectors and calibration processors -> delay codes) follows the document.
// The analog parts (clock generator, delay units with their route mismatch, SHAs, comparators)
// are behavioural models, so this top is a simulation model; the digital parts are
// synthesizable on their own.  Mismatch values come from a fixed hash (ROUTE_MAX_PS,
// OS_MAX_LSB); they are the errors the loops remove, not properties of the design.
// Timing: clk_ref is the channel clock; every channel samples once per clk_ref period, phase
// j at about T_s/2 + j*T_s after the clk_ref edge.  x_par changes on the clk_ref rising
// edge and then holds the frame whose sampling period began two rising edges earlier; x_ser
// streams it on clk_fs.
module tiadc_top
  import tiadc_pkg::*;
#(
  parameter int unsigned M            = M_CH,
  parameter int unsigned N            = N_BITS,
  parameter int unsigned NC_BCC_P     = NC_BCC,
  parameter int unsigned NC_SKEW_P    = NC_SKEW,
  parameter int unsigned TW           = TW_DEF,
  parameter real         TCLK_PS      = TC_PS,
  parameter real         DV           = DV_LSB,
  parameter real         MU_T_DIV     = real'(MU_DIV),
  parameter real         TAU0_PS      = 20.0,
  parameter real         ROUTE_MAX_PS = 4.0,   // clock-route mismatch, +/- ps
  parameter real         OS_MAX_LSB   = 1.0,   // comparator mismatch, +/- LSB
  parameter real         STEP_PS      = 2.0,   // breakpoint grid of vin
  localparam int unsigned SW          = $clog2(M)
) (
  input  logic                 clk_ref,
  input  logic                 rst_n,
  input  real                  vin,
  output logic                 clk_fs,
  output logic [M-1:0][N-1:0]  x_par,
  output logic [N-1:0]         x_ser,
  output logic [SW-1:0]        x_slot,
  output logic                 x_valid,
  output logic [M-1:0][TW-1:0] tcode
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TS_PS = TCLK_PS / M;

  function automatic real route_ps(int unsigned j);
    logic [31:0] h;
    h = 32'(j + 7) * 32'h9e37_79b9;
    h = h ^ (h >> 16);
    h = h * 32'h7feb_352d;
    h = h ^ (h >> 15);
    return ROUTE_MAX_PS * (real'(h % 32'd2001) - 1000.0) / 1000.0;
  endfunction

  logic [M-1:0]        phi, ck;
  logic [M-1:0][0:0]   phi_in, phi_c;
  logic [M-2:0]        swap_now, swap_dly;
  logic [M-1:0][N-1:0] code_ch;
  logic                frame_tgl;

  clock_gen_model #(.M(M), .TC_PS(TCLK_PS), .T_OFF_PS(TS_PS / 2.0 - TAU0_PS)) u_clkgen (
    .clk_ref, .phi, .clk_fs
  );

  assign phi_in = phi;
  pair_chopper #(.M(M), .W(1)) u_clk_chop (.swap(swap_now), .din(phi_in), .dout(phi_c));

  for (genvar j = 0; j < int'(M); j++) begin : g_ch
    delay_unit_model #(
      .TW(TW), .TAU0_PS(TAU0_PS), .STEP_PS(TS_PS / MU_T_DIV), .ROUTE_PS(route_ps(j))
    ) u_dly (
      .ck_in(phi_c[j][0]), .code(tcode[j]), .ck_out(ck[j])
    );

    flash_adc_channel #(
      .N(N), .NC(NC_BCC_P), .TW(TW), .DV(DV), .OS_MAX(OS_MAX_LSB), .OS_SEED(j + 1),
      .STEP_PS(STEP_PS)
    ) u_adc (
      .clk(clk_ref), .rst_n, .ck(ck[j]), .vin, .code(code_ch[j]),
      .trim(), .s_pos(), .s_neg()
    );
  end

  pair_chopper #(.M(M), .W(N)) u_data_chop (.swap(swap_dly), .din(code_ch), .dout(x_par));

  skew_cal_processor #(.M(M), .N(N), .NC(NC_SKEW_P), .TW(TW), .LAT(2)) u_skew (
    .clk(clk_ref), .rst_n, .x(x_par), .swap_now, .swap_dly, .tcode,
    .s_pos(), .s_neg(), .zc()
  );

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) frame_tgl <= 1'b0;
    else        frame_tgl <= ~frame_tgl;
  end

  ti_mux #(.M(M), .N(N)) u_mux (
    .clk_fs, .rst_n, .frame_tgl, .x_par, .x_ser, .slot(x_slot), .valid(x_valid)
  );
endmodule
