`timescale 1ns / 1ps
// tuning_ctrl: loop control unit (tuning control unit, TCU) for one of the
// coarse, medium and fine loops.
//
// It combines a Bi-SR with a sequence detector. The controller FSM drives
// inc/dec: in the phase that owns this loop exactly one of them is high each
// cycle (inc when VOUT is below VREF), otherwise both are low. The loop turns
// inc into a shift-left and dec into a shift-right of its Bi-SR, one buffer
// per cycle, until its detector reports done; from then on the code is
// frozen. The gating of the shift strobes by the detector output and the
// enable of the detector by the shift strobes follow the published loop
// control diagram.
//
// clr loads zeros into the register and re-arms the detector (used for the
// medium and fine loops when the controller restarts from coarse tuning).
// rearm only re-arms the detector and keeps the code (used for the coarse
// loop, which restarts from its present setting). Both are this design's
// reading of the restart.
//
// Timing: code changes on the rising edge after inc/dec; done is
// combinational in the cycle the pattern is seen (no shift happens then).
module tuning_ctrl #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clr,
  input  logic         rearm,
  input  logic         inc,
  input  logic         dec,
  output logic [W-1:0] code,
  output logic         done
);

  logic sel, sat, sl, sr;

  assign sel = inc ^ dec;
  assign sat = (inc && (&code)) || (dec && !(|code));
  assign sl  = inc && !dec && !done;
  assign sr  = dec && !inc && !done;

  bisr #(.W(W)) u_bisr (
    .clk (clk),
    .rst (rst),
    .clr (clr),
    .sl  (sl),
    .sr  (sr),
    .q   (code)
  );

  // While the loop is selected, inc carries the comparator decision.
  seq_detector u_det (
    .clk   (clk),
    .rst   (rst),
    .rearm (clr || rearm),
    .en    (sel),
    .cmp   (inc),
    .sat   (sat),
    .done  (done)
  );

endmodule
