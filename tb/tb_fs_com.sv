`timescale 1ns / 1ps
// tb_fs_com: checks the comparator model at VSUP = 0.5 V.
//  * Random input pairs over the full common-mode range: after a rising
//    clock edge plus the 662 ps delay, out = (inp > inn) and outn = !out,
//    whenever the selected stage is in its range.
//  * stg_sel = 1 when either input is above VSUP/2 (NAND stage selected),
//    else 0 (NOR stage).
//  * The output does not change prev_out the delay, nor while the clock is
//    low, nor when the selected stage is outside its range.
module tb_fs_com;
  logic clk = 0, out, outn, stg_sel;
  real inp = 0.0, inn = 0.0, vsup = 0.5;
  int checks = 0, failures = 0;
  int n_nand = 0, n_nor = 0;

  fs_com dut (.clk, .inp, .inn, .vsup, .out, .outn, .stg_sel);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s inp=%f inn=%f out=%b", what, inp, inn, out); end
  endtask

  task automatic sample(input real p, input real n, output logic prev_out);
    inp = p; inn = n;
    #10;
    prev_out = out;
    clk = 1;
    #0.3;
    check(out == prev_out, "no change before the clock-to-output delay");
    #0.5;
    clk = 0;
    #10;
  endtask

  logic prev_out, exp_out;
  real p, n, vcm;
  bit  sel, inrange;
  initial begin
    repeat (500) begin
      p = vsup * real'($urandom_range(0, 1000)) / 1000.0;
      n = vsup * real'($urandom_range(0, 1000)) / 1000.0;
      if (p == n) n = n + 0.001;
      vcm = (p + n) / 2.0;
      sel = (p > vsup / 2.0) || (n > vsup / 2.0);
      inrange = sel ? (vcm >= 0.4 * vsup) : (vcm <= 0.6 * vsup);
      sample(p, n, prev_out);
      exp_out = inrange ? (p > n) : prev_out;
      check(out == exp_out, "decision (or hold when out of range)");
      check(outn == !out, "outn is the complement");
      check(stg_sel == sel, "stage select from the two input levels");
      if (sel && inrange) n_nand++;
      if (!sel && inrange) n_nor++;
      // Changing the inputs with the clock low must not change the output.
      inp = n; inn = p;
      #20 check(out == exp_out, "holds while the clock is low");
    end
    // Out of range of the NAND stage: hold.
    sample(0.45, 0.01, prev_out);
    sample(0.01, 0.30, prev_out);   // NAND stage, vcm 0.155 V < 0.2 V: hold
    check(out == prev_out, "NAND stage outside its range holds");
    check(n_nand > 50 && n_nor > 50, "both stages exercised");
    $display("NAND decisions %0d, NOR decisions %0d", n_nand, n_nor);
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
