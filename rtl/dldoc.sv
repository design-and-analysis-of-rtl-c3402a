`timescale 1ns / 1ps
// dldoc: digital LDO controller (DLDOC / D-CTRL).
//
// It turns the one-bit comparator decision into the enables of the four
// tri-state buffer sections. It holds the phase FSM, three loop control units
// (coarse 13 bits, medium 4, fine 4) and the quivering unit (4 bits). Only one
// section moves per cycle, by one buffer. Power-up loads zeros into every
// register; the FSM starts with coarse tuning.
//
// A rst1 pulse from the quivering unit is combined with the external reset
// for the medium, fine and quivering registers, as in the published
// controller diagram; the coarse register keeps its code and only its
// detector is re-armed, so coarse tuning resumes from where it stopped (this
// design's reading).
//
// FREEZE_MODE selects the quad-loop regulator with freeze mode (1) or the
// tri-loop regulator that quivers continuously in steady state (0).
//
// Interface: cmp is the comparator decision sampled in the current cycle
// (1: VOUT below VREF); out_window/in_window come from the
// overshoot/undershoot detector and are ignored when FREEZE_MODE is 0.
// Timing: all codes change on the rising clock edge; one step per cycle.
module dldoc
  import ldo_pkg::*;
#(
  parameter bit          FREEZE_MODE = 1'b1,
  parameter int unsigned CW          = CT_W,
  parameter int unsigned MW          = MT_W,
  parameter int unsigned FW          = FT_W,
  parameter int unsigned QW          = QT_W,
  parameter int unsigned TIMEOUT     = QT_TIMEOUT
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          cmp,
  input  logic          out_window,
  output logic [CW-1:0] ct,
  output logic [MW-1:0] mt,
  output logic [FW-1:0] ft,
  output logic [QW-1:0] qt,
  output ctrl_state_e   state,
  output logic          freeze,
  output logic          rst1
);

  logic c_inc, c_dec, m_inc, m_dec, f_inc, f_dec, qc;
  logic c_done, m_done, f_done, freeze_en;

  dldo_fsm #(.FREEZE_MODE(FREEZE_MODE)) u_fsm (
    .clk        (clk),
    .rst        (rst),
    .cmp        (cmp),
    .c_done     (c_done),
    .m_done     (m_done),
    .f_done     (f_done),
    .rst1       (rst1),
    .freeze_en  (freeze_en),
    .out_window (out_window),
    .state      (state),
    .c_inc      (c_inc),
    .c_dec      (c_dec),
    .m_inc      (m_inc),
    .m_dec      (m_dec),
    .f_inc      (f_inc),
    .f_dec      (f_dec),
    .qc         (qc),
    .freeze     (freeze)
  );

  tuning_ctrl #(.W(CW)) u_coarse (
    .clk (clk), .rst (rst), .clr (1'b0), .rearm (rst1),
    .inc (c_inc), .dec (c_dec), .code (ct), .done (c_done)
  );

  tuning_ctrl #(.W(MW)) u_medium (
    .clk (clk), .rst (rst), .clr (rst1), .rearm (1'b0),
    .inc (m_inc), .dec (m_dec), .code (mt), .done (m_done)
  );

  tuning_ctrl #(.W(FW)) u_fine (
    .clk (clk), .rst (rst), .clr (rst1), .rearm (1'b0),
    .inc (f_inc), .dec (f_dec), .code (ft), .done (f_done)
  );

  qtu #(.FREEZE_MODE(FREEZE_MODE), .W(QW), .TIMEOUT(TIMEOUT)) u_qtu (
    .clk       (clk),
    .rst       (rst),
    .clr       (rst1),
    .qc        (qc),
    .cmp       (cmp),
    .in_window (!out_window),
    .qt        (qt),
    .rst1      (rst1),
    .freeze_en (freeze_en)
  );

endmodule
