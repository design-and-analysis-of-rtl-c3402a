`timescale 1ns / 1ps
// quiver_detector: pattern detector of the quivering unit (Pattern Detector
// II).
//
// While quivering is enabled (en) it watches the comparator output (cmp: 1
// means VOUT is below VREF) and does two jobs:
//  * Load-step detection: if cmp has not toggled for TIMEOUT cycles after a
//    sample, the smallest buffers cannot bring VOUT back, so it pulses rst1.
//    The controller then restarts from coarse tuning and clears the medium,
//    fine and quivering registers. The four-cycle limit is the published one.
//  * Steady-state detection: when it sees "0 then 1" VOUT is toggling
//    around VREF by one smallest step; it raises lock. Whether lock actually
//    enters freeze mode is decided by the caller (quivering unit). The use of
//    the same "01" sequence as the other loops is this design's reading.
// The history is dropped whenever en is low, so every quivering episode starts
// fresh (this design's choice).
//
// Timing: rst1 and lock are combinational in the cycle whose sample completes
// the condition; the history updates on the rising edge.
module quiver_detector #(
  parameter int unsigned TIMEOUT = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic cmp,
  output logic rst1,
  output logic lock
);

  localparam int unsigned CW = $clog2(TIMEOUT + 1);

  logic          prev_q, valid_q;
  logic [CW-1:0] same_q;   // cycles since the last toggle

  assign rst1 = en && valid_q && (cmp == prev_q) && (same_q == CW'(TIMEOUT - 1));
  assign lock = en && valid_q && !prev_q && cmp;

  always_ff @(posedge clk) begin
    if (rst || !en || rst1) begin
      prev_q  <= 1'b0;
      valid_q <= 1'b0;
      same_q  <= '0;
    end else begin
      prev_q  <= cmp;
      valid_q <= 1'b1;
      if (valid_q && cmp == prev_q) same_q <= same_q + 1'b1;
      else                          same_q <= '0;
    end
  end

endmodule
