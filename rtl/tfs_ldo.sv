`timescale 1ns / 1ps
// tfs_ldo: top level of the fully synthesizable digital low-dropout
// regulator.
//
// A clocked comparator compares VOUT with VREF once per clock cycle. The
// digital controller turns its decision into the enables of a tri-state
// buffer array that connects VSUP to VOUT through coarse (13 x64), medium
// (4 x16), fine (4 x4) and quivering (4 x1) buffers, one buffer per cycle.
// With FREEZE_MODE = 1 (default, the transient-enhanced quad-loop
// regulator) an overshoot/undershoot detector watches the window VREFL..VREFH
// in steady state and the controller freezes every register while VOUT stays
// inside it. With FREEZE_MODE = 0 (the earlier tri-loop regulator) the
// detector is not built and the controller keeps quivering one x1 buffer.
//
// The comparators are clocked on the falling edge of clk, so each decision
// sees the VOUT produced by the code set on the preceding rising edge and the
// controller acts on it at the next rising edge: one code step per cycle with
// no extra cycle of loop delay. That clock phase is this design's choice.
// In freeze mode the main comparator's clock is stopped (only the window
// detector keeps sampling); freeze is published as saving dynamic power,
// and stopping this clock is this design's way of doing so. The controller
// never reads the stale comparator bit: it leaves freeze into quivering, and
// the comparator samples again half a cycle before that bit is used.
// VOUT is fed straight to the comparator (no feedback divider), as in the
// published prototype, so the regulated level equals VREF.
//
// The comparator, window detector and buffer array are behavioural models
// with real-valued ports (they stand for analog-acting standard-cell
// circuits), so this top is a simulation model as a whole; the synthesizable
// logic is the controller, dldoc, and everything below it.
//
// Interface: vout is the sensed output node; g_tba/i_tba describe what the
// buffer array delivers into it (the output capacitor and load are outside).
// Timing: codes change on rising edges of clk; a 10 MHz clock is the
// published operating point.
module tfs_ldo
  import ldo_pkg::*;
#(
  parameter bit  FREEZE_MODE = 1'b1,
  parameter real G_UNIT_S    = 60.0e-6
) (
  input  logic            clk,
  input  logic            rst,
  input  real             vsup,
  input  real             vref,
  input  real             vrefh,
  input  real             vrefl,
  input  real             vout,
  output real             g_tba,
  output real             i_tba,
  output int unsigned     units,
  output logic [CT_W-1:0] ct,
  output logic [MT_W-1:0] mt,
  output logic [FT_W-1:0] ft,
  output logic [QT_W-1:0] qt,
  output ctrl_state_e     state,
  output logic            cmp_out,
  output logic            freeze,
  output logic            out_window,
  output logic            rst1
);

  logic cmp_clk, main_clk, cmp_n, cmp_sel;

  assign cmp_clk  = !clk;
  // Freeze mode stops the main comparator. freeze changes just after a
  // rising edge of clk, while !clk is already low, so the gated clock cannot
  // glitch.
  assign main_clk = !clk && !freeze;

  // Main comparator: 1 when VOUT is below VREF.
  fs_com u_com (
    .clk (main_clk), .inp (vref), .inn (vout), .vsup (vsup),
    .out (cmp_out), .outn (cmp_n), .stg_sel (cmp_sel)
  );

  if (FREEZE_MODE) begin : g_oud
    oud u_oud (
      .clk        (cmp_clk),
      .vout       (vout),
      .vrefh      (vrefh),
      .vrefl      (vrefl),
      .vsup       (vsup),
      .out_window (out_window)
    );
  end else begin : g_no_oud
    assign out_window = 1'b0;
  end

  dldoc #(.FREEZE_MODE(FREEZE_MODE)) u_ctrl (
    .clk        (clk),
    .rst        (rst),
    .cmp        (cmp_out),
    .out_window (out_window),
    .ct         (ct),
    .mt         (mt),
    .ft         (ft),
    .qt         (qt),
    .state      (state),
    .freeze     (freeze),
    .rst1       (rst1)
  );

  tba #(.G_UNIT_S(G_UNIT_S)) u_tba (
    .ct    (ct),
    .mt    (mt),
    .ft    (ft),
    .qt    (qt),
    .vsup  (vsup),
    .vout  (vout),
    .units (units),
    .g_on  (g_tba),
    .i_out (i_tba)
  );

endmodule
