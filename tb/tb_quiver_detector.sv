`timescale 1ns / 1ps
// tb_quiver_detector: checks the quivering pattern detector. rst1 must fire
// on the fifth equal comparator sample in a row (the first sample plus four
// cycles without a toggle), never while the comparator toggles, and lock
// must fire on a 0-then-1 pair. Random streams are compared with a reference
// model that counts equal samples.
module tb_quiver_detector;
  logic clk = 0, rst = 1, en = 0, cmp = 0, rst1, lock;
  int checks = 0, failures = 0;
  int run_len;      // equal samples in a row, in the model
  logic last;
  bit   have;

  quiver_detector #(.TIMEOUT(4)) dut (.clk, .rst, .en, .cmp, .rst1, .lock);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (run=%0d)", what, run_len); end
  endtask

  // Model: rst1 when this sample makes five equal in a row.
  function automatic bit m_rst1();
    return en && have && cmp == last && run_len + 1 >= 5;
  endfunction
  function automatic bit m_lock();
    return en && have && !last && cmp;
  endfunction

  always @(posedge clk) begin
    if (rst || !en || m_rst1()) begin have <= 0; run_len <= 0; end
    else begin
      run_len <= (have && cmp == last) ? run_len + 1 : 1;
      have <= 1;
      last <= cmp;
    end
  end

  task automatic drive(input bit e, input bit c);
    @(negedge clk); en = e; cmp = c; #1;
  endtask

  initial begin
    run_len = 0; have = 0; last = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    // Five equal samples.
    drive(1, 1); check(!rst1, "sample 1");
    drive(1, 1); check(!rst1, "sample 2");
    drive(1, 1); check(!rst1, "sample 3");
    drive(1, 1); check(!rst1, "sample 4");
    drive(1, 1); check(rst1,  "fifth equal sample fires rst1");
    // Toggling never fires rst1; 0 then 1 locks.
    drive(0, 0);
    drive(1, 0); check(!lock, "first sample never locks");
    drive(1, 1); check(lock && !rst1, "0 then 1 locks");
    drive(1, 0); check(!lock && !rst1, "1 then 0 does not lock");
    repeat (20) begin
      drive(1, !cmp); check(!rst1, "toggling never times out");
    end
    drive(0, 0);
    repeat (600) begin
      @(negedge clk);
      en  = $urandom_range(0, 15) != 0;
      cmp = ($urandom_range(0, 3) == 0) ? !cmp : cmp;
      #1;
      check(rst1 == m_rst1(), "random: rst1 matches model");
      check(lock == m_lock(), "random: lock matches model");
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
