`timescale 1ns / 1ps
// bisr: bidirectional shift register (Bi-SR) that drives one tri-state
// buffer section of the LDO power stage.
//
// Each bit enables one buffer. A shift-left (sl) moves the word up one place
// and fills bit 0 with a 1, so one more buffer turns on per cycle and the
// enabled buffers always form a run of ones from bit 0 (a thermometer code).
// A shift-right (sr) moves the word down one place and fills the MSB with a
// 0, turning the most recently enabled buffer off. Reset, and the
// synchronous clear used when the controller restarts from coarse tuning,
// load all zeros so every buffer is in high impedance. Fill values, shift
// directions and the all-zero start follow the published description; the
// priority of clear over shifting and the hold when both shift strobes are
// high are this design's choices.
//
// Timing: q changes on the rising clock edge after sl, sr or clr is sampled.
module bisr #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst,   // synchronous, active high: load zeros
  input  logic         clr,   // synchronous clear (controller restart)
  input  logic         sl,    // shift left, fill LSB with 1
  input  logic         sr,    // shift right, fill MSB with 0
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst || clr)      q <= '0;
    else if (sl && !sr)  q <= {q[W-2:0], 1'b1};
    else if (sr && !sl)  q <= {1'b0, q[W-1:1]};
  end

endmodule
