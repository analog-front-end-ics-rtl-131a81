// End-to-end test of the interleaved converter at reduced loop thresholds: both background
// calibrations (comparator offsets and channel timing skews) must settle from deliberately
// mismatched comparators and clock routes, and the output must then match an ideal 6-bit
// quantizer sampling at the nominal instants.  See tiadc_e2e_body.svh for the checks.
module tb_tiadc_top;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int  M         = 8;
  localparam int  N         = 6;
  localparam int  L         = 63;
  localparam int  TW        = 6;
  localparam int  NCB       = 8;
  localparam int  NCS       = 29;
  localparam real ROUTE_MAX = 6.0;
  localparam real OS_MAX    = 1.5;
  localparam int  CYCLES    = 150000;
  localparam int  SETTLE    = 50000;
  localparam real F_IN_GHZ  = 1.1317;

  logic                 clk_ref, rst_n, clk_fs, x_valid;
  real                  vin;
  logic [M-1:0][N-1:0]  x_par;
  logic [N-1:0]         x_ser;
  logic [2:0]           x_slot;
  logic [M-1:0][TW-1:0] tcode;

  tiadc_top #(
    .NC_BCC_P(NCB), .NC_SKEW_P(NCS), .ROUTE_MAX_PS(ROUTE_MAX), .OS_MAX_LSB(OS_MAX)
  ) dut (.*);

  `include "tiadc_e2e_body.svh"
endmodule
