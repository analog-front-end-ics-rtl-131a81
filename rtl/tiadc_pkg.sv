// Shared constants and types of the time-interleaved flash ADC.
//
// The defaults are those of the 8-channel, 6-bit, 16-GS/s converter: M = 8 channels,
// N = 6 bits per channel, f_c = 2 GHz per channel (f_s = M * f_c = 16 GS/s).
// The comparator calibration uses N_C = 16 and a trim step of 1/4 LSB; the timing-skew
// calibration uses N_C = 29 and a delay step of T_s/28.  Trim-code widths and the chopping
// sequence generators are this design's own choices.
package tiadc_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned M_CH      = 8;      // A/D channels
  localparam int unsigned N_BITS    = 6;      // resolution of one channel
  localparam int unsigned NC_BCC    = 16;     // BPD threshold, comparator offset loop
  localparam int unsigned NC_SKEW   = 29;     // BPD threshold, timing-skew loop
  localparam int unsigned TW_DEF    = 6;      // width of the ACC2 trim code (signed)
  localparam real         TC_PS     = 500.0;  // channel clock period 1/f_c in ps
  localparam real         DV_LSB    = 0.25;   // comparator offset trim step (LSB)
  localparam int unsigned MU_DIV    = 28;     // delay step mu_t = T_s / MU_DIV

  // Output of the bilateral peak detector, S[k] in {-1, 0, +1}.
  typedef enum logic [1:0] {
    S_ZERO = 2'b00,
    S_POS  = 2'b01,
    S_NEG  = 2'b11
  } bpd_e;
endpackage
