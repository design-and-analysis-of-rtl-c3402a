`timescale 1ns / 1ps
// tb_tba: checks the buffer array model: the x1 unit count is
// 64, 16, 4 and 1 per enabled bit of the coarse, medium, fine and quivering
// sections, and the current is units * G_UNIT * (VSUP - VOUT), zero when
// VOUT is not below VSUP. Random enable patterns; the expected values are
// computed here bit by bit.
module tb_tba;
  import ldo_pkg::*;
  logic [12:0] ct; logic [3:0] mt, ft, qt;
  real vsup = 0.5, vout = 0.45, g_on, i_out;
  int unsigned units;
  int checks = 0, failures = 0;

  tba dut (.ct, .mt, .ft, .qt, .vsup, .vout, .units, .g_on, .i_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s units=%0d i=%g", what, units, i_out); end
  endtask

  int exp_u;
  real exp_i;
  initial begin
    ct = '1; mt = '1; ft = '1; qt = '1; vout = 0.45;
    #1 check(units == 13 * 64 + 4 * 16 + 4 * 4 + 4, "all buffers on: 916 units");
    check(i_out > 2.0e-3, "full array carries more than 2 mA at 50 mV dropout");
    repeat (300) begin
      ct = 13'($urandom); mt = 4'($urandom); ft = 4'($urandom); qt = 4'($urandom);
      vout = 0.6 * real'($urandom_range(0, 1000)) / 1000.0;
      exp_u = 0;
      for (int b = 0; b < 13; b++) exp_u += ct[b] ? 64 : 0;
      for (int b = 0; b < 4; b++)  exp_u += (mt[b] ? 16 : 0) + (ft[b] ? 4 : 0) + (qt[b] ? 1 : 0);
      exp_i = (vout < vsup) ? real'(exp_u) * 60.0e-6 * (vsup - vout) : 0.0;
      #1;
      check(units == exp_u, "weighted unit count");
      check(i_out - exp_i < 1.0e-12 && exp_i - i_out < 1.0e-12, "current");
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
