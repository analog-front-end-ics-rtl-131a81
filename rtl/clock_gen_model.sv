// Behavioural model of the multi-phase clock generator (a DLL on the chip).  Not synthesizable.
//
// From the channel reference clock clk_ref (frequency f_c, period TC_PS) it produces M phase
// clocks phi[0..M-1] of the same frequency with equally spaced phases: phase j rises
// T_OFF_PS + j*T_s after each rising edge of clk_ref, T_s = TC_PS/M, and stays high for
// T_s/4 (short pulses, so the choppers can exchange phases while all of them are low).
// clk_fs is the OR of the phases: one rising edge per sampling instant, at f_s = M*f_c.
// Locking, jitter and phase errors of the DLL are not modelled: the document assumes the
// generator's phases are accurate.  Pulse width and offset are this model's choices; the
// model requires T_OFF_PS + (M-1)*T_s + T_s/4 < TC_PS.
module clock_gen_model #(
  parameter int unsigned M        = 8,
  parameter real         TC_PS    = 500.0,
  parameter real         T_OFF_PS = 11.25
) (
  input  logic         clk_ref,
  output logic [M-1:0] phi,
  output logic         clk_fs
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TS_PS = TC_PS / M;

  initial phi = '0;

  for (genvar j = 0; j < int'(M); j++) begin : g_ph
    always @(posedge clk_ref) begin
      #(T_OFF_PS + j * TS_PS);
      phi[j] = 1'b1;
      #(TS_PS / 4.0);
      phi[j] = 1'b0;
    end
  end

  assign clk_fs = |phi;
endmodule
