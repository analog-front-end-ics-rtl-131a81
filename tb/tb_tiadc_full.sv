// Full-size test of the interleaved converter with every parameter at its default: 8 channels,
// 6 bits, N_C = 16 for the comparator loops, N_C = 29 and a T_s/28 delay step for the skew
// loop, 4 ps clock-route and 1 LSB comparator mismatch.  200,000 channel-clock cycles
// (100 us at 2 GHz): both calibrations settle and the output then matches an ideal quantizer.
// The localparams below restate the defaults for the shared checks in tiadc_e2e_body.svh.
module tb_tiadc_full;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int  M         = 8;
  localparam int  N         = 6;
  localparam int  L         = 63;
  localparam int  TW        = 6;
  localparam int  NCB       = 16;
  localparam int  NCS       = 29;
  localparam real ROUTE_MAX = 4.0;
  localparam real OS_MAX    = 1.0;
  localparam int  CYCLES    = 200000;
  localparam int  SETTLE    = 150000;
  localparam real F_IN_GHZ  = 1.1317;

  logic                 clk_ref, rst_n, clk_fs, x_valid;
  real                  vin;
  logic [M-1:0][N-1:0]  x_par;
  logic [N-1:0]         x_ser;
  logic [2:0]           x_slot;
  logic [M-1:0][TW-1:0] tcode;

  tiadc_top dut (.*);

  `include "tiadc_e2e_body.svh"
endmodule
