`timescale 1ns / 1ps
// tb_dldoc: closed-loop test of the digital controller against an idealised
// output expressed in x1 units: VOUT is below VREF while the weighted number
// of enabled buffers, 64*ones(ct) + 16*ones(mt) + 4*ones(ft) + ones(qt), is
// below a real target T. The window detector is modelled as
// |units - T| > 2.
//
// Expected behaviour worked out from the loop rules (not from the RTL):
//  * T = 300.5 from reset: coarse climbs to 5 buffers and steps back to 4
//    (256), medium climbs to 3 and back to 2 (288), fine climbs to 4 and back
//    to 3 (300), quivering goes to 1 and back to 0 and the controller freezes
//    at 300 units after 7 + 5 + 6 + 3 = 21 clock edges;
//  * a tri-loop instance (no freeze mode) reaches quivering and toggles
//    between 300 and 301 units;
//  * a large step of T makes the window detector release freeze, quivering
//    saturates and after the four-cycle fallback the controller re-tunes from
//    coarse and settles within one unit of the new target;
//  * a step of half a unit is absorbed by quivering without fallback.
module tb_dldoc;
  import ldo_pkg::*;
  logic clk = 0, rst = 1;
  real  T = 300.5;
  int checks = 0, failures = 0;

  logic [12:0] ct_f, ct_n; logic [3:0] mt_f, mt_n, ft_f, ft_n, qt_f, qt_n;
  ctrl_state_e st_f, st_n; logic frz_f, frz_n, r1_f, r1_n;
  int units_f, units_n;
  logic cmp_f, cmp_n, ow_f;

  assign units_f = 64 * $countones(ct_f) + 16 * $countones(mt_f) + 4 * $countones(ft_f) + $countones(qt_f);
  assign units_n = 64 * $countones(ct_n) + 16 * $countones(mt_n) + 4 * $countones(ft_n) + $countones(qt_n);
  assign cmp_f = real'(units_f) < T;
  assign cmp_n = real'(units_n) < T;
  assign ow_f  = (real'(units_f) - T > 2.0) || (T - real'(units_f) > 2.0);

  dldoc #(.FREEZE_MODE(1'b1)) dut_f (.clk, .rst, .cmp (cmp_f), .out_window (ow_f),
    .ct (ct_f), .mt (mt_f), .ft (ft_f), .qt (qt_f), .state (st_f), .freeze (frz_f), .rst1 (r1_f));
  dldoc #(.FREEZE_MODE(1'b0)) dut_n (.clk, .rst, .cmp (cmp_n), .out_window (1'b0),
    .ct (ct_n), .mt (mt_n), .ft (ft_n), .qt (qt_n), .state (st_n), .freeze (frz_n), .rst1 (r1_n));

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (units_f=%0d st_f=%s units_n=%0d st_n=%s T=%f)",
                                         what, units_f, st_f.name(), units_n, st_n.name(), T); end
  endtask

  int edges, n_r1, r1_before;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    edges = 0;
    while (st_f != ST_FREEZE && edges < 200) begin @(posedge clk); edges++; #1; end
    check(edges == 21, $sformatf("start-up reaches freeze after 21 edges (took %0d)", edges));
    check(units_f == 300, "frozen at floor(T)");
    check(ct_f == 13'b1111 && mt_f == 4'b0011 && ft_f == 4'b0111 && qt_f == 4'b0000,
          "per-section codes after start-up");
    repeat (10) begin
      @(posedge clk); #1;
      check(st_n == ST_QUIVER && (units_n == 300 || units_n == 301), "tri-loop quivers around T");
      check(frz_f && units_f == 300, "quad-loop stays frozen");
    end
    // Large step.
    n_r1 = 0;
    @(negedge clk) T = 620.5;
    repeat (80) begin
      @(posedge clk); #1;
      if (r1_f) n_r1++;
    end
    check(n_r1 >= 1, "fallback to coarse after a large step");
    check(frz_f && (units_f == 620 || units_f == 621), "re-tuned and frozen at the new target");
    check(st_n == ST_QUIVER && (units_n == 620 || units_n == 621), "tri-loop re-tuned");
    // Step down.
    @(negedge clk) T = 100.5;
    repeat (80) @(posedge clk);
    #1 check(frz_f && (units_f == 100 || units_f == 101), "re-tuned after a step down");
    check(units_n == 100 || units_n == 101, "tri-loop re-tuned after a step down");
    // Half-unit step: quivering only.
    r1_before = n_r1;
    @(negedge clk) T = (units_n == 100) ? 100.8 : 100.2;
    repeat (20) begin
      @(posedge clk); #1;
      check(!r1_n, "tri-loop absorbs a sub-unit step without fallback");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
