`timescale 1ns / 1ps
// dldo_fsm: phase controller of the digital LDO controller.
//
// It steps through the published tuning order: coarse, medium, fine, then
// quivering, and (with FREEZE_MODE) freeze. In the coarse, medium and fine
// phases it hands the comparator decision to the owning loop as INC (VOUT
// below VREF) or DEC (VOUT above VREF); the other loops see neither and hold.
// A loop's done flag moves the phase on in the same clock edge. In the
// quivering phase it raises qc. A rst1 pulse from the quivering detector
// (no comparator toggle for four cycles) sends it back to coarse tuning and
// re-arms the coarse loop; the caller clears the medium, fine and quivering
// registers with the same pulse. In freeze mode every register holds until
// the overshoot/undershoot detector reports VOUT outside its window
// (out_window), which resumes quivering.
//
// The phase order, the four-cycle fallback and the freeze exit follow the
// published flow charts; the state encoding (ldo_pkg::ctrl_state_e) and the
// exact edge on which each transition happens are this design's choices.
//
// Timing: Moore state register; the INC/DEC and qc outputs are combinational
// from the state and the current comparator bit.
module dldo_fsm
  import ldo_pkg::*;
#(
  parameter bit FREEZE_MODE = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        cmp,         // 1: VOUT below VREF
  input  logic        c_done,
  input  logic        m_done,
  input  logic        f_done,
  input  logic        rst1,        // quivering gave up: restart from coarse
  input  logic        freeze_en,   // quivering settled inside the window
  input  logic        out_window,  // VOUT left the VREFL..VREFH window
  output ctrl_state_e state,
  output logic        c_inc, c_dec,
  output logic        m_inc, m_dec,
  output logic        f_inc, f_dec,
  output logic        qc,
  output logic        freeze
);

  ctrl_state_e state_d;

  always_comb begin
    state_d = state;
    unique case (state)
      ST_COARSE: if (c_done) state_d = ST_MEDIUM;
      ST_MEDIUM: if (m_done) state_d = ST_FINE;
      ST_FINE:   if (f_done) state_d = ST_QUIVER;
      ST_QUIVER: begin
        if (rst1)                           state_d = ST_COARSE;
        else if (FREEZE_MODE && freeze_en)  state_d = ST_FREEZE;
      end
      ST_FREEZE: if (out_window) state_d = ST_QUIVER;
      default:   state_d = ST_COARSE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= ST_COARSE;
    else     state <= state_d;
  end

  assign c_inc  = (state == ST_COARSE) &&  cmp;
  assign c_dec  = (state == ST_COARSE) && !cmp;
  assign m_inc  = (state == ST_MEDIUM) &&  cmp;
  assign m_dec  = (state == ST_MEDIUM) && !cmp;
  assign f_inc  = (state == ST_FINE)   &&  cmp;
  assign f_dec  = (state == ST_FINE)   && !cmp;
  assign qc     = (state == ST_QUIVER);
  assign freeze = (state == ST_FREEZE);

  // Only one loop may shift in any cycle.
  a_one_loop: assert property (@(posedge clk) disable iff (rst)
    $onehot0({c_inc | c_dec, m_inc | m_dec, f_inc | f_dec, qc}));

endmodule
