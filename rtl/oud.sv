`timescale 1ns / 1ps
// oud: overshoot/undershoot detector. Behavioural model, because its two
// comparators are behavioural models of analog-acting cells.
//
// Two clocked comparators compare VOUT with the upper and lower window limits
// VREFH and VREFL (100.2 % and 99.8 % of VREF in the published design), and
// an exclusive-NOR cell combines their decisions:
//   hi_below = (VOUT < VREFH), lo_below = (VOUT < VREFL)
//   out_window = XNOR(hi_below, lo_below)
// Inside the window hi_below = 1 and lo_below = 0, so out_window = 0; above
// VREFH both are 0 and below VREFL both are 1, so out_window = 1. The two
// comparators and the XNOR cell are as published; which comparator input
// receives which voltage is this design's choice.
//
// Timing: out_window follows the comparators, one TPD after the rising edge
// of clk, and holds while clk is low.
module oud (
  input  logic clk,
  input  real  vout,
  input  real  vrefh,
  input  real  vrefl,
  input  real  vsup,
  output logic out_window
);

  logic hi_below, lo_below;
  logic hi_n, lo_n, hi_sel, lo_sel;

  fs_com u_cmp_h (
    .clk (clk), .inp (vrefh), .inn (vout), .vsup (vsup),
    .out (hi_below), .outn (hi_n), .stg_sel (hi_sel)
  );

  fs_com u_cmp_l (
    .clk (clk), .inp (vrefl), .inn (vout), .vsup (vsup),
    .out (lo_below), .outn (lo_n), .stg_sel (lo_sel)
  );

  assign out_window = !(hi_below ^ lo_below);

endmodule
