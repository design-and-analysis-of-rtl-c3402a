`timescale 1ns / 1ps
// tb_dldo_fsm: checks the phase controller. A directed pass walks the
// published flow (coarse, medium, fine, quiver, freeze, back to quiver,
// fallback to coarse); then random inputs drive two instances (with and
// without freeze mode) against a next-state table written here, and the
// INC/DEC/qc outputs are checked against the comparator bit and the phase.
module tb_dldo_fsm;
  import ldo_pkg::*;
  logic clk = 0, rst = 1;
  logic cmp = 0, c_done = 0, m_done = 0, f_done = 0, rst1 = 0, freeze_en = 0, out_window = 0;
  ctrl_state_e st_f, st_n, m_f, m_n;
  logic ci_f, cd_f, mi_f, md_f, fi_f, fd_f, qc_f, fz_f;
  logic ci_n, cd_n, mi_n, md_n, fi_n, fd_n, qc_n, fz_n;
  int checks = 0, failures = 0;

  dldo_fsm #(.FREEZE_MODE(1'b1)) dut_f (.clk, .rst, .cmp, .c_done, .m_done, .f_done, .rst1,
    .freeze_en, .out_window, .state (st_f), .c_inc (ci_f), .c_dec (cd_f), .m_inc (mi_f),
    .m_dec (md_f), .f_inc (fi_f), .f_dec (fd_f), .qc (qc_f), .freeze (fz_f));
  dldo_fsm #(.FREEZE_MODE(1'b0)) dut_n (.clk, .rst, .cmp, .c_done, .m_done, .f_done, .rst1,
    .freeze_en, .out_window, .state (st_n), .c_inc (ci_n), .c_dec (cd_n), .m_inc (mi_n),
    .m_dec (md_n), .f_inc (fi_n), .f_dec (fd_n), .qc (qc_n), .freeze (fz_n));

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (st_f=%s st_n=%s)", what, st_f.name(), st_n.name()); end
  endtask

  function automatic ctrl_state_e nxt(ctrl_state_e s, bit fm);
    case (s)
      ST_COARSE: return c_done ? ST_MEDIUM : s;
      ST_MEDIUM: return m_done ? ST_FINE : s;
      ST_FINE:   return f_done ? ST_QUIVER : s;
      ST_QUIVER: return rst1 ? ST_COARSE : ((fm && freeze_en) ? ST_FREEZE : s);
      ST_FREEZE: return out_window ? ST_QUIVER : s;
      default:   return ST_COARSE;
    endcase
  endfunction

  always @(posedge clk) begin
    if (rst) begin m_f <= ST_COARSE; m_n <= ST_COARSE; end
    else begin m_f <= nxt(m_f, 1'b1); m_n <= nxt(m_n, 1'b0); end
  end

  task automatic outputs_ok(input ctrl_state_e s, input logic ci, cd, mi, md, fi, fd, qc, fz, input string tag);
    check(ci == (s == ST_COARSE && cmp) && cd == (s == ST_COARSE && !cmp), {tag, " coarse INC/DEC"});
    check(mi == (s == ST_MEDIUM && cmp) && md == (s == ST_MEDIUM && !cmp), {tag, " medium INC/DEC"});
    check(fi == (s == ST_FINE && cmp)   && fd == (s == ST_FINE && !cmp),   {tag, " fine INC/DEC"});
    check(qc == (s == ST_QUIVER) && fz == (s == ST_FREEZE), {tag, " qc/freeze"});
  endtask

  task automatic step(input bit c, cd, md, fd, r1, fe, ow);
    @(negedge clk);
    cmp = c; c_done = cd; m_done = md; f_done = fd; rst1 = r1; freeze_en = fe; out_window = ow;
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    #1 check(st_f == ST_COARSE, "starts in coarse");
    step(1, 0, 0, 0, 0, 0, 0); check(st_f == ST_COARSE, "coarse holds until done");
    step(1, 1, 0, 0, 0, 0, 0); check(st_f == ST_MEDIUM, "coarse done -> medium");
    step(0, 0, 1, 0, 0, 0, 0); check(st_f == ST_FINE,   "medium done -> fine");
    step(0, 0, 0, 1, 0, 0, 0); check(st_f == ST_QUIVER, "fine done -> quiver");
    step(1, 0, 0, 0, 0, 1, 0); check(st_f == ST_FREEZE, "freeze_en -> freeze");
    check(st_n == ST_QUIVER, "no freeze without freeze mode");
    step(1, 0, 0, 0, 0, 0, 0); check(st_f == ST_FREEZE, "freeze holds in window");
    step(1, 0, 0, 0, 0, 0, 1); check(st_f == ST_QUIVER, "window exit -> quiver");
    step(1, 0, 0, 0, 1, 0, 0); check(st_f == ST_COARSE && st_n == ST_COARSE, "rst1 -> coarse");
    // Random against the table.
    @(negedge clk) rst = 1; @(negedge clk) rst = 0;
    repeat (2000) begin
      @(negedge clk);
      cmp = $urandom_range(0, 1);
      c_done = $urandom_range(0, 3) == 0;
      m_done = $urandom_range(0, 3) == 0;
      f_done = $urandom_range(0, 3) == 0;
      rst1 = $urandom_range(0, 7) == 0;
      freeze_en = $urandom_range(0, 3) == 0;
      out_window = $urandom_range(0, 3) == 0;
      #1;
      check(st_f == m_f && st_n == m_n, "state matches table");
      outputs_ok(st_f, ci_f, cd_f, mi_f, md_f, fi_f, fd_f, qc_f, fz_f, "freeze-mode");
      outputs_ok(st_n, ci_n, cd_n, mi_n, md_n, fi_n, fd_n, qc_n, fz_n, "tri-loop");
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
