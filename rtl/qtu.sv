`timescale 1ns / 1ps
// qtu: quivering control unit (QCU in the tri-loop regulator, QTU in the
// quad-loop regulator).
//
// It owns the four smallest (x1) tri-state buffers. When the controller
// enables it (qc), it shifts its Bi-SR one place per cycle toward VREF: left
// (one more buffer on) while VOUT is below VREF, right (one buffer off) while
// it is above. In steady state this toggles one buffer back and forth, which
// keeps VOUT within one x1 step of VREF and keeps watching the load.
//
// Its pattern detector raises rst1 when VOUT does not toggle for four cycles
// (a load step too large for quivering). With FREEZE_MODE set (quad-loop
// regulator) it also raises freeze_en when VOUT toggles around VREF and the
// overshoot/undershoot detector reports VOUT inside its window (in_window);
// the code is then held. With FREEZE_MODE clear (tri-loop regulator) it
// quivers for ever. The combination of the toggle with in_window is this
// design's reading of two published statements (the QTU and the detector both
// "activate" freeze mode).
//
// clr loads zeros (controller restart). Timing: qt changes on the rising
// edge; rst1 and freeze_en are combinational in the cycle they are detected.
module qtu
  import ldo_pkg::*;
#(
  parameter bit          FREEZE_MODE = 1'b1,
  parameter int unsigned W           = QT_W,
  parameter int unsigned TIMEOUT     = QT_TIMEOUT
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clr,
  input  logic         qc,         // quivering enabled by the FSM
  input  logic         cmp,        // 1: VOUT below VREF
  input  logic         in_window,  // VREFL < VOUT < VREFH
  output logic [W-1:0] qt,
  output logic         rst1,
  output logic         freeze_en
);

  logic lock, sl, sr;

  quiver_detector #(.TIMEOUT(TIMEOUT)) u_det (
    .clk  (clk),
    .rst  (rst || clr),
    .en   (qc),
    .cmp  (cmp),
    .rst1 (rst1),
    .lock (lock)
  );

  assign freeze_en = FREEZE_MODE && lock && in_window;
  assign sl        = qc && cmp  && !freeze_en;
  assign sr        = qc && !cmp && !freeze_en;

  bisr #(.W(W)) u_bisr (
    .clk (clk),
    .rst (rst),
    .clr (clr),
    .sl  (sl),
    .sr  (sr),
    .q   (qt)
  );

endmodule
