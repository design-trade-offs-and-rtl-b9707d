// tb_thread_scheduler: self-checking test of the dispatch thread selection.
// Random issue-queue counts, queue occupancies, precaution and drain; the
// expected ICOUNT choice, the LT and TT eligibility (non-empty IFQ without
// precaution; slack distance reached and a dispatchable trace-queue head) and
// the first-served thread are computed here from the policy.
module tb_thread_scheduler;
  import ftsmt_pkg::*;
  logic [6:0] icount_lt, icount_tt;
  logic [5:0] ifq_count;
  logic [8:0] tq_count, distance;
  logic [3:0] tq_avail;
  logic precaution, drain, lt_blocked, lt_ok, tt_ok, slack_hold;
  thread_e sel, first;
  int checks = 0, failures = 0;
  int n_slack = 0, n_pre = 0, n_tt_first = 0, n_lt_first = 0;

  thread_scheduler dut (.*);

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int d;
      logic e_lt, e_tt, e_tt_sel;
      icount_lt = 7'($urandom_range(0, 64));
      icount_tt = ($urandom_range(0, 3) == 0) ? icount_lt : 7'($urandom_range(0, 64));
      ifq_count = ($urandom_range(0, 4) == 0) ? 0 : 6'($urandom_range(1, 32));
      tq_count  = 9'($urandom_range(ifq_count, 256));
      tq_avail  = ($urandom_range(0, 3) == 0) ? 0 : 4'($urandom_range(1, 8));
      if (tq_count == 0) tq_avail = 0;
      precaution = ($urandom_range(0, 3) == 0);
      drain      = ($urandom_range(0, 7) == 0);
      lt_blocked = ($urandom_range(0, 5) == 0);
      #1;
      d    = int'(tq_count) - int'(ifq_count);
      e_tt_sel = int'(icount_tt) < int'(icount_lt);
      e_lt = (ifq_count != 0) && !precaution;
      e_tt = (drain || lt_blocked || d >= SLACK) && (tq_avail != 0);
      chk(int'(distance) === d, $sformatf("distance %0d", n));
      chk(sel === (e_tt_sel ? THR_TT : THR_LT), $sformatf("icount select %0d", n));
      chk(lt_ok === e_lt && tt_ok === e_tt, $sformatf("eligibility %0d", n));
      chk(slack_hold === (!drain && !lt_blocked && d < SLACK), "slack hold");
      if (e_tt_sel) chk(first === (e_tt ? THR_TT : THR_LT), $sformatf("first (TT sel) %0d", n));
      else          chk(first === (e_lt ? THR_LT : THR_TT), $sformatf("first (LT sel) %0d", n));
      if (slack_hold) n_slack++;
      if (precaution && ifq_count != 0) n_pre++;
      if (first == THR_TT) n_tt_first++; else n_lt_first++;
    end
    chk(n_slack > 50 && n_pre > 50 && n_tt_first > 50 && n_lt_first > 50, "all cases reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
