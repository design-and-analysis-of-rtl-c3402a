`timescale 1ns / 1ps
// tb_oud: checks the overshoot/undershoot detector at the published test
// point (VREF = 0.45 V, VREFH = 450.9 mV, VREFL = 449.1 mV, VSUP = 0.5 V):
// out_window must be 0 for VOUT strictly inside the window and 1 above
// VREFH or below VREFL, after each clock edge. Random VOUT values around the
// window are compared with the expected value.
module tb_oud;
  logic clk = 0, out_window;
  real vout = 0.45, vrefh = 0.4509, vrefl = 0.4491, vsup = 0.5;
  int checks = 0, failures = 0, n_in = 0, n_out = 0;

  oud dut (.clk, .vout, .vrefh, .vrefl, .vsup, .out_window);

  always #50 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s vout=%f ow=%b", what, vout, out_window); end
  endtask

  bit expect_out;
  initial begin
    repeat (400) begin
      @(negedge clk);
      vout = 0.445 + 0.01 * real'($urandom_range(0, 1000)) / 1000.0;
      if (vout == vrefh || vout == vrefl) vout = vout + 0.00001;
      expect_out = (vout > vrefh) || (vout < vrefl);
      @(posedge clk); #2;
      check(out_window == expect_out, "window decision");
      if (expect_out) n_out++; else n_in++;
    end
    check(n_in > 20 && n_out > 20, "both sides exercised");
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
