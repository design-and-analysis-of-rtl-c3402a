`timescale 1ns / 1ps
// ldo_pkg: sizes and shared types of the fully synthesizable digital LDO.
//
// The power stage is split into four sections of tri-state buffers that
// differ only in drive strength: coarse (13 cells of x64), medium (4 of x16),
// fine (4 of x4) and quivering (4 of x1). Those counts and strengths are the
// published ones. The controller state encoding is this design's own choice.
package ldo_pkg;

  // Number of tri-state buffers (one Bi-SR bit each) per section.
  localparam int unsigned CT_W = 13;
  localparam int unsigned MT_W = 4;
  localparam int unsigned FT_W = 4;
  localparam int unsigned QT_W = 4;

  // Relative drive strength of one buffer of each section (x64, x16, x4, x1).
  localparam int unsigned CT_STRENGTH = 64;
  localparam int unsigned MT_STRENGTH = 16;
  localparam int unsigned FT_STRENGTH = 4;
  localparam int unsigned QT_STRENGTH = 1;

  // Cycles without a comparator toggle, after the first quivering sample,
  // that mark a large load step and send the controller back to coarse tuning.
  localparam int unsigned QT_TIMEOUT = 4;

  // Controller phases. FREEZE exists only when freeze mode is built in.
  typedef enum logic [2:0] {
    ST_COARSE = 3'd0,
    ST_MEDIUM = 3'd1,
    ST_FINE   = 3'd2,
    ST_QUIVER = 3'd3,
    ST_FREEZE = 3'd4
  } ctrl_state_e;

endpackage
