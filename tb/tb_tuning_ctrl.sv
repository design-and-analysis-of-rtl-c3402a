`timescale 1ns / 1ps
// tb_tuning_ctrl: closed-loop test of one tuning loop at the coarse width
// (13) against an idealised output: VOUT is below VREF while the number of
// enabled buffers is below a real-valued target t. The FSM side is played by
// the testbench (inc = VOUT below VREF, dec = its complement).
// Expected, from the shift rules alone: from zero the loop enables ceil(t)
// buffers (one per cycle), sees VOUT above VREF, disables one, sees "01"
// and stops with floor(t) buffers after ceil(t) + 1 clock edges. From
// above it disables buffers until floor(t) and stops at once. A
// target beyond the register ends the loop by saturation. rearm keeps the
// code; clr zeroes it.
module tb_tuning_ctrl;
  localparam int W = 13;
  logic clk = 0, rst = 1, clr = 0, rearm = 0, inc = 0, dec = 0, done;
  logic [W-1:0] code;
  real  t;
  bit   active = 0;
  int   checks = 0, failures = 0;

  tuning_ctrl #(.W(W)) dut (.clk, .rst, .clr, .rearm, .inc, .dec, .code, .done);

  always #5 clk = !clk;

  always_comb begin
    inc = active && (real'($countones(code)) < t);
    dec = active && !(real'($countones(code)) < t);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (code=%b t=%f)", what, code, t); end
  endtask

  function automatic bit is_thermo(logic [W-1:0] c);
    return ((c + 1'b1) & c) == '0;
  endfunction

  // Run the loop until done; return active cycles.
  task automatic run(output int n);
    n = 0;
    @(negedge clk) active = 1;
    while (!done && n < 100) begin
      @(posedge clk); n++;
      #1 check(is_thermo(code), "code stays a thermometer code");
    end
    @(negedge clk) active = 0;
  endtask

  int n;
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    t = 5.5;
    run(n);
    check($countones(code) == 5, "ramp up stops at floor(t)");
    check(n == 6 + 1, "ramp up takes ceil(t)+1 cycles");
    // Code frozen once done.
    repeat (3) @(posedge clk);
    check($countones(code) == 5, "frozen after done");
    // From above: rearm keeps code, target lower.
    @(negedge clk) rearm = 1; @(negedge clk) rearm = 0;
    check($countones(code) == 5, "rearm keeps the code");
    t = 2.5;
    run(n);
    check($countones(code) == 2, "ramp down stops at floor(t)");
    check(n == 3, "ramp down takes start - floor(t) cycles");
    // Saturation.
    @(negedge clk) rearm = 1; @(negedge clk) rearm = 0;
    t = 20.0;
    run(n);
    check(code == '1, "saturated at all ones");
    check(n == W - 2, "saturation ends the loop as soon as the register is full");
    // clr.
    @(negedge clk) clr = 1; @(negedge clk) clr = 0;
    check(code == '0 && !done, "clr zeroes code and re-arms");
    // Random targets.
    repeat (40) begin
      @(negedge clk) rearm = 1; @(negedge clk) rearm = 0;
      t = real'($urandom_range(0, 2 * W)) / 2.0 + 0.25;
      run(n);
      if (t < W) check($countones(code) == int'($floor(t)), "random target reached");
      else       check(code == '1, "random target saturates");
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
