// Binary random chopping-sequence generator.
//
// A Fibonacci linear-feedback shift register of width W with feedback taps TAP_A and TAP_B
// (1-based, XOR).  Every state bit is a copy of the same maximal-length sequence, shifted by
// one cycle per bit position, so bit i serves as an independent-looking chopping sequence
// q_i[k] (1 -> q = +1, 0 -> q = -1).  The document asks only for binary random sequences;
// the LFSR, its polynomial and seed are this design's choices.  Advances once per cycle when
// en = 1; reset loads SEED (which must be non-zero).
module lfsr_seq #(
  parameter int unsigned W     = 63,
  parameter int unsigned TAP_A = 63,
  parameter int unsigned TAP_B = 62,
  parameter logic [W-1:0] SEED = W'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] state
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {state[W-2:0], state[TAP_A-1] ^ state[TAP_B-1]};
  end

  a_nonzero: assert property (@(posedge clk) disable iff (!rst_n) state != '0);
endmodule
