`timescale 1ns / 1ps
// tb_seq_detector: checks the "01" sequence detector of a tuning loop.
// Directed cases: no detection on the first sample after arming, detection
// on 0 then 1, no detection on 1 then 0 or on repeated values, the
// saturation exit, sticking of done and re-arming. Then random comparator
// streams against a reference model written in the testbench.
module tb_seq_detector;
  logic clk = 0, rst = 1, rearm = 0, en = 0, cmp = 0, sat = 0, done;
  int checks = 0, failures = 0;
  logic m_prev, m_valid, m_done;

  seq_detector dut (.clk, .rst, .rearm, .en, .cmp, .sat, .done);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit model_done();
    return m_done || (en && !m_done && ((m_valid && !m_prev && cmp) || sat));
  endfunction

  always @(posedge clk) begin
    if (rst || rearm) begin m_prev <= 0; m_valid <= 0; m_done <= 0; end
    else if (en && !m_done) begin m_prev <= cmp; m_valid <= 1; m_done <= model_done(); end
  end

  task automatic drive(input bit e, input bit c, input bit s);
    @(negedge clk);
    en = e; cmp = c; sat = s;
    #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    drive(1, 1, 0); check(!done, "first sample alone never detects");
    drive(1, 1, 0); check(!done, "1 then 1 does not detect");
    drive(1, 0, 0); check(!done, "1 then 0 does not detect");
    drive(1, 0, 0); check(!done, "0 then 0 does not detect");
    drive(1, 1, 0); check(done,  "0 then 1 detects in the same cycle");
    drive(1, 0, 0); check(done,  "done sticks");
    drive(0, 1, 0); check(done,  "done sticks while idle");
    @(negedge clk) rearm = 1; @(negedge clk) rearm = 0; #1;
    check(!done, "rearm clears done");
    drive(1, 0, 0);
    drive(0, 1, 0); check(!done, "no detection while disabled");
    drive(1, 1, 1); check(done, "saturation ends the loop");
    // Random streams against the model.
    repeat (500) begin
      @(negedge clk);
      en = $urandom_range(0, 3) != 0;
      cmp = $urandom_range(0, 1);
      sat = $urandom_range(0, 15) == 0;
      rearm = $urandom_range(0, 7) == 0;
      #1 check(done == model_done(), "random stream matches model");
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
