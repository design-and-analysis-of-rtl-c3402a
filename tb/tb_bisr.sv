`timescale 1ns / 1ps
// tb_bisr: random test of the bidirectional shift register at the coarse
// width (13). A reference model in the testbench applies the same
// shift-left-fill-1 / shift-right-fill-0 / clear rules and the outputs are
// compared every cycle. It also checks that a full ramp from zero takes
// exactly W cycles (one buffer per cycle).
module tb_bisr;
  localparam int W = 13;
  logic clk = 0, rst = 1, clr = 0, sl = 0, sr = 0;
  logic [W-1:0] q, ref_q;
  int checks = 0, failures = 0, cycles = 0;

  bisr #(.W(W)) dut (.clk, .rst, .clr, .sl, .sr, .q);

  always #5 clk = !clk;
  always @(posedge clk) cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s q=%b ref=%b", what, q, ref_q); end
  endtask

  always @(posedge clk) begin
    if (rst || clr)     ref_q <= '0;
    else if (sl && !sr) ref_q <= (ref_q << 1) | W'(1);
    else if (sr && !sl) ref_q <= ref_q >> 1;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    check(q == '0, "zeros after reset");
    // Full ramp up: W shifts left give all ones; one more keeps all ones.
    sl <= 1;
    repeat (W) @(posedge clk);
    #1 check(q == '1, "all ones after W shift-lefts");
    check(q == ref_q, "ramp matches model");
    repeat (1) @(posedge clk);
    #1 check(q == '1, "saturates at all ones");
    sl <= 0; sr <= 1;
    @(posedge clk); #1 check(q == {1'b0, {(W-1){1'b1}}}, "shift right fills MSB with 0");
    sr <= 0;
    // Random operation against the model.
    repeat (400) begin
      @(negedge clk);
      sl  <= $urandom_range(0, 1);
      sr  <= $urandom_range(0, 1);
      clr <= ($urandom_range(0, 15) == 0);
      @(posedge clk); #1;
      check(q == ref_q, "random sequence matches model");
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
