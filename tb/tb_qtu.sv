`timescale 1ns / 1ps
// tb_qtu: closed-loop test of the quivering unit against an idealised output
// (VOUT below VREF while fewer than t x1 buffers are on). Two instances run
// side by side: with freeze mode and without.
//  * Freeze mode, t = 2.5, window open: the code climbs to 3, steps back to
//    2, and freeze_en fires with the code held at 2.
//  * Same, but the window detector says VOUT is outside: no freeze, the code
//    keeps toggling between 2 and 3.
//  * No freeze mode: the code toggles between 2 and 3 for ever, no rst1.
//  * t beyond the four buffers: the code saturates at 1111 and rst1 fires on
//    the fifth sample that still says "below", then the code is cleared.
module tb_qtu;
  import ldo_pkg::*;
  logic clk = 0, rst = 1, qc = 0, in_window = 1;
  logic cmp_f, cmp_n;
  logic [3:0] qt_f, qt_n;
  logic rst1_f, rst1_n, frz_f, frz_n;
  real t = 2.5;
  int checks = 0, failures = 0;

  assign cmp_f = real'($countones(qt_f)) < t;
  assign cmp_n = real'($countones(qt_n)) < t;

  qtu #(.FREEZE_MODE(1'b1)) dut_f (.clk, .rst, .clr (rst1_f), .qc, .cmp (cmp_f), .in_window,
                                   .qt (qt_f), .rst1 (rst1_f), .freeze_en (frz_f));
  qtu #(.FREEZE_MODE(1'b0)) dut_n (.clk, .rst, .clr (rst1_n), .qc, .cmp (cmp_n), .in_window,
                                   .qt (qt_n), .rst1 (rst1_n), .freeze_en (frz_n));

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s qt_f=%b qt_n=%b", what, qt_f, qt_n); end
  endtask

  int n_frz, n_rst1_n, n_frz_n;
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk) qc = 1;
    n_frz = 0; n_rst1_n = 0; n_frz_n = 0;
    // Climb 0->1->2->3, back to 2, then 0-then-1 pattern.
    repeat (4) begin
      @(posedge clk); #1;
    end
    check(qt_f == 4'b0011 && frz_f, "freeze requested with the code at 2");
    @(posedge clk); #1;
    check(qt_f == 4'b0011, "code held on the freeze cycle");
    repeat (20) begin
      @(posedge clk); #1;
      if (frz_n) n_frz_n++;
      if (rst1_n) n_rst1_n++;
      check($countones(qt_n) inside {2, 3}, "tri-loop unit toggles between 2 and 3");
    end
    check(n_frz_n == 0, "no freeze without freeze mode");
    check(n_rst1_n == 0, "no fallback while toggling");
    // Window closed: freeze-mode unit keeps toggling.
    @(negedge clk) qc = 0; in_window = 0;
    @(negedge clk) qc = 1;
    begin
      logic [3:0] last_qt;
      repeat (20) begin
        last_qt = qt_f;
        @(posedge clk); #1;
        if (frz_f) n_frz++;
        check($countones(qt_f) inside {2, 3}, "outside the window the code keeps toggling");
        check(qt_f != last_qt, "outside the window the code moves every cycle");
        check(!frz_f, "no freeze request while outside the window");
      end
    end
    check(n_frz == 0, "no freeze while outside the window");
    // Large step: target beyond the four buffers.
    t = 7.0;
    @(negedge clk);
    // Code is 2 or 3; it needs 1 or 2 edges to reach 4, after which "below"
    // stays. rst1 must fire exactly on the fifth "below" sample.
    begin
      int below = 0, edges = 0;
      bit fired = 0;
      while (!fired && edges < 20) begin
        #1;
        if (cmp_f) below++;
        if (rst1_f) begin
          fired = 1;
          check(below == 5, "rst1 on the fifth consecutive 'below' sample");
          check(qt_f == 4'b1111, "code saturated when rst1 fires");
        end
        @(posedge clk); edges++;
      end
      check(fired, "rst1 fired for a step beyond the quivering range");
      #1 check(qt_f == 4'b0000, "code cleared by rst1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
