`timescale 1ns / 1ps
// seq_detector: the sequence (pattern) detector of one tuning loop.
//
// While its loop is shifting (en high) it records the comparator output
// (cmp: 1 means VOUT is below VREF). When it sees the two-sample sequence
// "0 then 1" it concludes that VOUT has started to ring around VREF and
// raises done, which freezes its loop and lets the controller move to the
// next, finer loop. The "01" sequence is the published trigger. This design
// adds three things of its own: the first sample after arming is never paired
// with a stale one (a valid bit); done is also raised when the loop is asked to
// move past the end of its register (saturated), because no "01" can then
// ever arrive; and done is combinational so that the loop does not shift on
// the cycle the pattern is seen.
//
// Interface: rearm clears done and the history (restart of a loop whose
// register is kept); rst clears it on power-up.
// Timing: done is combinational on cmp in the cycle the pattern completes
// (internally registered for the following cycles).
module seq_detector (
  input  logic clk,
  input  logic rst,
  input  logic rearm,
  input  logic en,       // loop selected and not yet finished
  input  logic cmp,      // comparator output for this cycle
  input  logic sat,      // loop asked to move past the end of its register
  output logic done      // loop finished (this cycle or earlier)
);

  logic prev_q, valid_q, done_q, hit;

  assign hit  = en && !done_q && ((valid_q && !prev_q && cmp) || sat);
  assign done = done_q || hit;

  always_ff @(posedge clk) begin
    if (rst || rearm) begin
      prev_q  <= 1'b0;
      valid_q <= 1'b0;
      done_q  <= 1'b0;
    end else if (en && !done_q) begin
      prev_q  <= cmp;
      valid_q <= 1'b1;
      done_q  <= hit;
    end
  end

endmodule
