`timescale 1ns / 1ps
// tba: behavioural model of the tri-state buffer array (TBA), the power
// stage. It is a model, not synthesizable logic: the real part is a set of
// high-threshold tri-state buffer cells whose inputs are tied to VSUP and
// whose outputs are all tied to VOUT, so that each enabled buffer acts as a
// switch conducting from VSUP to VOUT.
//
// Sections, cell counts and strengths are the published ones: coarse 13
// buffers of x64, medium 4 of x16, fine 4 of x4, quivering 4 of x1. Each
// enable bit turns one buffer on. The model treats every enabled buffer as a
// conductance proportional to its strength, G_UNIT_S siemens per x1, so
//   units = 64*ones(ct) + 16*ones(mt) + 4*ones(ft) + ones(qt)
//   g     = units * G_UNIT_S
//   i     = g * (VSUP - VOUT) when VSUP > VOUT, else 0
// G_UNIT_S is not published; its default (60 uS) lets the coarse section
// alone carry a 2 mA load at 50 mV dropout, as the published sizing
// requires.
//
// Timing: combinational (the cells switch within a clock period).
module tba
  import ldo_pkg::*;
#(
  parameter real G_UNIT_S = 60.0e-6
) (
  input  logic [CT_W-1:0] ct,
  input  logic [MT_W-1:0] mt,
  input  logic [FT_W-1:0] ft,
  input  logic [QT_W-1:0] qt,
  input  real             vsup,
  input  real             vout,
  output int unsigned     units,
  output real             g_on,
  output real             i_out
);

  always_comb begin
    units = CT_STRENGTH * $countones(ct) + MT_STRENGTH * $countones(mt)
          + FT_STRENGTH * $countones(ft) + QT_STRENGTH * $countones(qt);
    g_on  = real'(units) * G_UNIT_S;
    i_out = (vsup > vout) ? g_on * (vsup - vout) : 0.0;
  end

endmodule
