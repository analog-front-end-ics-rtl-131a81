// Output multiplexer: merges the M channel words of a frame into the full-rate stream x[l].
//
// Runs on the full-rate clock clk_fs (M edges per channel clock, the first one after the
// channel clock edge).  frame_tgl toggles once per channel-clock cycle in the channel clock
// domain and the frame word x_par is stable between its toggles; the first clk_fs edge that
// sees a new toggle value loads the frame and emits word 0, the next M-1 edges emit words
// 1..M-1.  The document gives only the multiplexer's function; the toggle hand-over is this
// design's choice and requires clk_fs edges to avoid the channel clock edges.
// Output timing: x_ser is registered on clk_fs; slot tells which channel it came from.
module ti_mux #(
  parameter int unsigned M = 8,
  parameter int unsigned N = 6,
  localparam int unsigned SW = $clog2(M)
) (
  input  logic                 clk_fs,
  input  logic                 rst_n,
  input  logic                 frame_tgl,
  input  logic [M-1:0][N-1:0]  x_par,
  output logic [N-1:0]         x_ser,
  output logic [SW-1:0]        slot,
  output logic                 valid
);
  timeunit 1ps;
  timeprecision 1fs;

  logic                tgl_seen;
  logic [M-1:0][N-1:0] frame;

  always_ff @(posedge clk_fs or negedge rst_n) begin
    if (!rst_n) begin
      tgl_seen <= 1'b0;
      frame    <= '0;
      x_ser    <= '0;
      slot     <= '0;
      valid    <= 1'b0;
    end else if (frame_tgl != tgl_seen) begin
      tgl_seen <= frame_tgl;
      frame    <= x_par;
      x_ser    <= x_par[0];
      slot     <= '0;
      valid    <= 1'b1;
    end else if (valid && slot != SW'(M - 1)) begin
      slot  <= slot + SW'(1);
      x_ser <= frame[slot + SW'(1)];
    end else begin
      valid <= 1'b0;
    end
  end
endmodule
