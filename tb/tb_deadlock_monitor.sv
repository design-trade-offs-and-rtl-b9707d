// tb_deadlock_monitor: self-checking test of the precaution signal.
// Random LT occupancy counts and thresholds, plus each count stepped across its
// threshold; the expected per-queue cautions and their OR are computed here.
module tb_deadlock_monitor;
  logic [7:0] rob_lt_cnt, rob_thresh;
  logic [6:0] lq_lt_cnt, sq_lt_cnt, lq_thresh, sq_thresh;
  logic rob_caution, lq_caution, sq_caution, precaution;
  int checks = 0, failures = 0;

  deadlock_monitor dut (.*);

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
    int seen_pre = 0, seen_clear = 0;
    for (int n = 0; n < 4000; n++) begin
      logic er, el, es;
      rob_thresh = 8'($urandom_range(1, 128));
      lq_thresh  = 7'($urandom_range(1, 64));
      sq_thresh  = 7'($urandom_range(1, 64));
      if (n < 3 * 129) begin
        // sweep one queue across its threshold, others below
        rob_lt_cnt = 0; lq_lt_cnt = 0; sq_lt_cnt = 0;
        case (n % 3)
          0: rob_lt_cnt = 8'(n / 3);
          1: lq_lt_cnt  = 7'((n / 3) % 65);
          default: sq_lt_cnt = 7'((n / 3) % 65);
        endcase
      end else begin
        rob_lt_cnt = 8'($urandom_range(0, 128));
        lq_lt_cnt  = 7'($urandom_range(0, 64));
        sq_lt_cnt  = 7'($urandom_range(0, 64));
      end
      #1;
      er = int'(rob_lt_cnt) >= int'(rob_thresh);
      el = int'(lq_lt_cnt) >= int'(lq_thresh);
      es = int'(sq_lt_cnt) >= int'(sq_thresh);
      chk(rob_caution === er && lq_caution === el && sq_caution === es,
          $sformatf("cautions %0d: rob %0d/%0d lq %0d/%0d sq %0d/%0d", n, rob_lt_cnt, rob_thresh, lq_lt_cnt, lq_thresh, sq_lt_cnt, sq_thresh));
      chk(precaution === (er || el || es), "precaution");
      if (precaution) seen_pre++; else seen_clear++;
    end
    chk(seen_pre > 100 && seen_clear > 100, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
