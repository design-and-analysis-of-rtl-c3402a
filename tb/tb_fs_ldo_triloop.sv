`timescale 1ns / 1ps
// tb_fs_ldo_triloop: end-to-end test of the tri-loop regulator (FREEZE_MODE = 0), which quivers continuously in steady state, with the output node modelled by
// tb/ldo_plant.sv (50 pF and a resistive load).
//
// Conditions are the published test point: VSUP = 0.5 V, VREF = 0.45 V,
// VREFH/VREFL = VREF +/- 0.2 %, 10 MHz clock, load stepping between 0.5 mA
// and 2 mA, plus a small step that quivering alone must absorb. Then the
// second published operating point (VSUP = 1 V, VREF = 0.95 V, 2 mA) and a
// line sweep of VSUP from 0.5 V to 1 V at VREF = 0.45 V and 2 mA.
//
// Checks, computed from the plant equations and not from the controller:
//  * after start-up and after each load step VOUT settles within one fine
//    step (plus 0.5 mV) of VREF and the controller is in steady state;
//  * the number of enabled x1 units matches the units needed to hold VREF at
//    the present load, i / (VSUP - VREF) / G_UNIT, within one medium step;
//  * the 1 % settling time after the 0.5 mA -> 2 mA step is reported and
//    must stay within 3 us (the published figures are 0.91 us and 1.2 us);
//  * with freeze mode, no code moves and the main comparator does not
//    switch while the controller stays frozen;
//  * each mechanism happens at least once: coarse, medium and fine loops
//    finishing, quivering, the four-cycle fallback to coarse tuning, a small
//    step handled without fallback, and (freeze mode) freeze entry and exit.
module tb_fs_ldo_triloop;
  import ldo_pkg::*;

  localparam bit  FM      = 1'b0;
  localparam real TCLK_NS = 100.0;       // 10 MHz
  localparam real G_UNIT  = 60.0e-6;     // default of tfs_ldo

  logic clk = 1'b0;
  logic rst = 1'b1;
  real  vsup = 0.5, vref = 0.45, vrefh, vrefl, i_load = 0.5e-3;

  real g_on, i_tba, vout;
  int unsigned units;
  logic [CT_W-1:0] ct; logic [MT_W-1:0] mt; logic [FT_W-1:0] ft; logic [QT_W-1:0] qt;
  ctrl_state_e st; logic cmp, frz, ow, r1;

  tfs_ldo #(.FREEZE_MODE(1'b0)) dut (
    .clk, .rst, .vsup, .vref, .vrefh, .vrefl, .vout,
    .g_tba (g_on), .i_tba, .units, .ct, .mt, .ft, .qt, .state (st),
    .cmp_out (cmp), .freeze (frz), .out_window (ow), .rst1 (r1)
  );
  ldo_plant plant (.g_on, .vsup, .i_load_a (i_load), .v_nom (vref), .vout);

  assign vrefh = vref * 1.002;
  assign vrefl = vref * 0.998;

  always #(TCLK_NS / 2.0) clk = !clk;

  int checks = 0, failures = 0;
  int cycle = 0;

  int n_medium = 0, n_fine = 0, n_quiver = 0, n_freeze_in = 0, n_freeze_out = 0;
  int n_rst1 = 0, n_frozen = 0, n_quiver_cycles = 0;
  ctrl_state_e st_q = ST_COARSE;
  logic [CT_W+MT_W+FT_W+QT_W-1:0] code_q;
  int n_cmp_clk_frozen = 0, n_cmp_clk = 0;

  // The main comparator's clock must not run while the controller is frozen.
  always @(posedge dut.main_clk) begin
    n_cmp_clk++;
    if (st == ST_FREEZE) n_cmp_clk_frozen++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  function automatic real units_needed(real i);
    return i / (vsup - vref) / G_UNIT;
  endfunction

  always @(posedge clk) begin
    cycle++;
    if (!rst) begin
      if (st == ST_MEDIUM && st_q == ST_COARSE) n_medium++;
      if (st == ST_FINE   && st_q == ST_MEDIUM) n_fine++;
      if (st == ST_QUIVER && st_q == ST_FINE)   n_quiver++;
      if (st == ST_FREEZE && st_q != ST_FREEZE) n_freeze_in++;
      if (st == ST_QUIVER && st_q == ST_FREEZE) n_freeze_out++;
      if (st == ST_COARSE && st_q == ST_QUIVER) n_rst1++;
      if (st == ST_QUIVER) n_quiver_cycles++;
      if (st == ST_FREEZE && st_q == ST_FREEZE) begin
        n_frozen++;
        check({ct, mt, ft, qt} == code_q, "codes held in freeze mode");
      end
      if (!FM) check(st != ST_FREEZE, "tri-loop regulator never freezes");
    end
    st_q   <= st;
    code_q <= {ct, mt, ft, qt};
  end

  task automatic settle_and_check(input int n, input string tag);
    real tol, need;
    repeat (n) @(posedge clk);
    #(TCLK_NS / 4.0);
    need = units_needed(i_load);
    // One fine step (x4) expressed in volts at this load, plus 0.5 mV.
    tol = vsup * (i_load / vref) * (FT_STRENGTH * G_UNIT)
        / ((need * G_UNIT + i_load / vref) ** 2) + 0.5e-3;
    $display("[%s] cycle %0d load %.2f mA: vout %.4f V, units %0d (needed %.1f), phase %s",
             tag, cycle, i_load * 1e3, vout, units, need, st.name());
    check(vout > vref - tol && vout < vref + tol, {tag, ": VOUT near VREF"});
    check(FM ? (st == ST_FREEZE || st == ST_QUIVER) : (st == ST_QUIVER), {tag, ": steady state"});
    check(real'(units) > need - MT_STRENGTH && real'(units) < need + MT_STRENGTH,
          {tag, ": enabled units match load"});
  endtask

  // Cycles until VOUT is back within 1 % of VREF and stays there for 20 cycles.
  task automatic settle_time(output int cyc);
    int n_in, t0;
    n_in = 0;
    t0 = cycle;
    cyc = -1;
    while (n_in < 20 && cycle - t0 < 200) begin
      @(posedge clk);
      #(TCLK_NS / 4.0);
      if (vout > vref * 0.99 && vout < vref * 1.01) begin
        if (n_in == 0) cyc = cycle - t0;
        n_in++;
      end else begin
        n_in = 0;
        cyc = -1;
      end
    end
  endtask

  int t_up, rst1_before;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    settle_and_check(120, "start-up at 0.5 mA");
    i_load = 2.0e-3;
    settle_time(t_up);
    $display("1%% settling after 0.5 -> 2 mA: %0d cycles (%.2f us)", t_up, t_up * TCLK_NS / 1000.0);
    check(t_up >= 0 && t_up <= 30, "settling within 3 us");
    settle_and_check(100, "step to 2 mA");
    i_load = 0.5e-3;
    settle_and_check(120, "step to 0.5 mA");
    // Small change: quivering alone must absorb it, without falling back.
    // The step is one x1 unit of current, toward the side where the
    // quivering register still has room.
    rst1_before = n_rst1;
    if ($countones(qt) >= 2) i_load = i_load - G_UNIT * (vsup - vref);
    else                     i_load = i_load + G_UNIT * (vsup - vref);
    settle_and_check(60, "small step of one x1 unit");
    check(n_rst1 == rst1_before, "small step absorbed without fallback to coarse");
    // Published second operating point: VSUP = 1 V, VREF = 0.95 V, 2 mA.
    vsup = 1.0; vref = 0.95; i_load = 2.0e-3;
    settle_and_check(150, "VSUP 1 V, VREF 0.95 V, 2 mA");
    // Line regulation sweep: VREF = 0.45 V, 2 mA, VSUP raised toward 1 V.
    vref = 0.45; vsup = 0.5;
    settle_and_check(150, "line: VSUP 0.5 V");
    vsup = 0.75;
    settle_and_check(150, "line: VSUP 0.75 V");
    vsup = 1.0;
    settle_and_check(150, "line: VSUP 1 V");

    check(n_medium >= 1,        "coarse loop finished");
    check(n_fine >= 1,          "medium loop finished");
    check(n_quiver >= 1,        "fine loop finished");
    check(n_rst1 >= 1,          "fallback to coarse tuning after a large step");
    check(n_quiver_cycles >= 1, "quivering happened");
    check(n_cmp_clk_frozen == 0, "main comparator not clocked in freeze mode");
    check(n_cmp_clk > 100,       "main comparator clocked outside freeze mode");
    if (FM) begin
      check(n_freeze_in >= 1,  "freeze mode entered");
      check(n_freeze_out >= 1, "freeze mode left by the window detector");
      check(n_frozen >= 1,     "cycles spent frozen");
    end
    $display("mechanisms: coarse done %0d, medium done %0d, fine done %0d, fallback %0d, quiver cycles %0d, freeze in %0d, freeze out %0d, frozen cycles %0d",
             n_medium, n_fine, n_quiver, n_rst1, n_quiver_cycles, n_freeze_in, n_freeze_out, n_frozen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TCLK_NS * 8000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
