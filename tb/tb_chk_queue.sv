// tb_chk_queue: self-checking test of the checking queue and comparator.
// LT retires a random program (up to 8 instructions per cycle, only while
// entries are free); TT retires the same instructions later, in order and
// never ahead of LT.  Occasionally a TT result, word or sequence number is
// corrupted: the queue must flag that instruction, keep its entry and free
// only the matched ones before it.  A flush then models the recovery and both
// streams restart from the faulting instruction.
module tb_chk_queue;
  import ftsmt_pkg::*;
  localparam int D = CHKQ_DEPTH, W = RET_W;
  logic clk = 0, rst_n = 0, flush;
  logic [$clog2(W+1)-1:0] lt_cnt, tt_cnt, checked_cnt;
  ret_t lt_ret [W];
  ret_t tt_ret [W];
  logic [$clog2(D+1)-1:0] count, free;
  logic fault_valid;
  seq_t fault_seq;
  int checks = 0, failures = 0, n_fault = 0, n_full = 0, n_checked = 0;

  chk_queue dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic ret_t prog(int idx);
    ret_t r;
    r.seq    = seq_t'(idx);
    r.word   = 32'(idx * 32'h9E3779B1);
    r.result = 32'(idx * 7 + 3) ^ 32'h5A5A0000;
    return r;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lt_next = 0, tt_next = 0;
    flush = 0; lt_cnt = 0; tt_cnt = 0;
    foreach (lt_ret[i]) begin lt_ret[i] = '0; tt_ret[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      int nl, nt, bad, exp_chk, bit_i;
      @(negedge clk);
      flush = 0;
      chk(int'(count) === lt_next - tt_next, $sformatf("count cyc %0d", cyc));
      chk(int'(free) === D - (lt_next - tt_next), "free");
      if (int'(free) == 0) n_full++;
      nl = $urandom_range(0, W);
      if ((cyc % 1000) > 700) nl = $urandom_range(0, 2);
      if (nl > D - (lt_next - tt_next)) nl = D - (lt_next - tt_next);
      nt = $urandom_range(0, ((cyc % 1000) < 300) ? 1 : W);
      if (nt > lt_next - tt_next) nt = lt_next - tt_next;
      for (int i = 0; i < W; i++) begin
        lt_ret[i] = prog(lt_next + i);
        tt_ret[i] = prog(tt_next + i);
      end
      bad = -1;
      if (nt > 0 && $urandom_range(0, 40) == 0) begin
        bad = $urandom_range(0, nt - 1);
        bit_i = $urandom_range(0, 31);
        case ($urandom_range(0, 2))
          0: tt_ret[bad].result[bit_i] ^= 1'b1;
          1: tt_ret[bad].word[bit_i] ^= 1'b1;
          default: tt_ret[bad].seq ^= seq_t'(1 << (bit_i % SEQ_W));
        endcase
      end
      lt_cnt = nl; tt_cnt = nt;
      #1;
      exp_chk = (bad >= 0) ? bad : nt;
      chk(int'(checked_cnt) === exp_chk, $sformatf("checked %0d vs %0d cyc %0d", checked_cnt, exp_chk, cyc));
      chk(fault_valid === (bad >= 0), $sformatf("fault flag cyc %0d", cyc));
      if (bad >= 0) chk(fault_seq === tt_ret[bad].seq, "fault seq");
      @(posedge clk);
      lt_next += nl;
      tt_next += exp_chk;
      n_checked += exp_chk;
      if (bad >= 0) begin
        n_fault++;
        // recovery: flush and restart both from the faulting instruction
        @(negedge clk);
        lt_cnt = 0; tt_cnt = 0; flush = 1;
        @(posedge clk);
        lt_next = tt_next;
      end
    end
    chk(n_fault > 10 && n_full > 20 && n_checked > 5000, "faults, full queue and checks reached");
    $display("faults=%0d full=%0d checked=%0d", n_fault, n_full, n_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
