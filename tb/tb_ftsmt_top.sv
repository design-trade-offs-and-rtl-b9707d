// tb_ftsmt_top: end-to-end test of the fault-tolerant SMT dispatch and check
// core.  Two configurations run side by side on the same kind of synthetic
// program, each with the behavioural back end: the default one (dynamic
// deadlock monitoring) and one with static partitioning of ROB, LQ and SQ.
// Each must run its whole program to completion, every instruction compared
// by the checking queue, with every injected fault detected (a deadlock ends
// in the watchdog).  The test also requires that every mechanism happened:
// slack hold, slack waiver, TT pause at an unresolved branch, misprediction
// flush, precaution (dynamic), LT held at its ROB share (static), full chkQ,
// full LVQ, ICOUNT picking TT, slots shared by both threads, LVQ forwarding,
// fault detection and the end-of-program drain.
module tb_ftsmt_top;
  import ftsmt_pkg::*;
  localparam int NPROG = 1500;
  logic clk = 0, rst_n = 0;
  localparam int unsigned FW = FETCH_W, DW = DISP_W, RW = RET_W;
  localparam int unsigned FCW    = $clog2(FW + 1);
  localparam int unsigned DCW    = $clog2(DW + 1);
  localparam int unsigned RCW    = $clog2(RW + 1);
  localparam int unsigned TQ_CW  = $clog2(TQ_DEPTH + 1);
  localparam int unsigned IQ_CW  = $clog2(IQ_SIZE + 1);
  localparam int unsigned ROB_CW = $clog2(ROB_SIZE + 1);
  localparam int unsigned LQ_CW  = $clog2(LQ_SIZE + 1);
  localparam int unsigned SQ_CW  = $clog2(SQ_SIZE + 1);
  localparam int unsigned LVQ_CW = $clog2(LVQ_DEPTH + 1);
  localparam int unsigned CQ_CW  = $clog2(CHKQ_DEPTH + 1);
  logic [FCW-1:0]    fetch_cnt;
  fetch_t            fetch_bundle [FW];
  logic              fetch_ready;
  logic              drain;
  logic              br_valid;
  seq_t              br_seq;
  logic              br_mispred;
  logic              disp_valid [DW];
  qent_t             disp_ent [DW];
  logic [DCW-1:0]    disp_lt_cnt;
  logic [DCW-1:0]    disp_tt_cnt;
  logic [IQ_CW-1:0]  iq_issue_lt;
  logic [IQ_CW-1:0]  iq_issue_tt;
  logic [ROB_CW-1:0] rob_rel_lt;
  logic [ROB_CW-1:0] rob_rel_tt;
  logic [LQ_CW-1:0]  lq_rel_lt;
  logic [LQ_CW-1:0]  lq_rel_tt;
  logic [SQ_CW-1:0]  sq_rel_lt;
  logic [SQ_CW-1:0]  sq_rel_tt;
  logic              lvq_wr_valid;
  seq_t              lvq_wr_seq;
  data_t             lvq_wr_data;
  logic              lvq_full;
  logic              lvq_rd_valid;
  seq_t              lvq_rd_seq;
  logic              lvq_rd_hit;
  data_t             lvq_rd_data;
  logic [RCW-1:0]    lt_ret_cnt;
  ret_t              lt_ret [RW];
  logic [RCW-1:0]    tt_ret_cnt;
  ret_t              tt_ret [RW];
  logic              chk_flush;
  logic [CQ_CW-1:0]  chkq_free;
  logic [CQ_CW-1:0]  chkq_count;
  logic [RCW-1:0]    checked_cnt;
  logic              fault_valid;
  seq_t              fault_seq;
  logic              precaution;
  logic [2:0]        caution;
  thread_e           sched_sel;
  logic              slack_hold;
  logic              slack_waived;
  logic [TQ_CW-1:0]  distance;
  logic [IQ_CW-1:0]  icount_lt;
  logic [IQ_CW-1:0]  icount_tt;
  logic [ROB_CW-1:0] rob_lt_cnt;
  logic [ROB_CW-1:0] rob_tt_cnt;
  logic [LQ_CW-1:0]  lq_lt_cnt;
  logic [SQ_CW-1:0]  sq_lt_cnt;
  logic [LVQ_CW-1:0] lvq_count;
  logic              unres_stall;

  int checks = 0, failures = 0;

  ftsmt_top dut (.*);
  ft_backend_model #(.NPROG(NPROG), .SEED(3)) model (.*);
  assign unres_stall = (dut.u_tq.count != '0) && (dut.u_tq.avail == '0);
  ftsmt_static_bench #(.NPROG(NPROG)) sbench (.clk, .rst_n);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic finish_report();
    $display("dynamic: cycles=%0d checked=%0d lt_disp=%0d tt_disp=%0d mispred=%0d faults=%0d/%0d",
             model.cyc, model.n_checked, model.n_lt_disp, model.n_tt_disp, model.n_mispred, model.n_faults_det, model.n_faults_inj);
    $display("dynamic: slack_hold=%0d slack_waived=%0d unresolved_branch_stall=%0d precaution=%0d lt_at_rob_limit=%0d chkq_full=%0d lvq_full=%0d",
             model.n_slack_hold, model.n_slack_waived, model.n_unres_stall, model.n_precaution, model.n_lt_cap, model.n_chkq_full, model.n_lvq_full);
    $display("dynamic: icount_tt_first=%0d both_threads_one_cycle=%0d drain=%0d lvq_forwards=%0d misses=%0d ipc_x100=%0d",
             model.n_tt_first, model.n_both, model.n_drain, model.n_tt_load_fwd, model.n_miss, (model.n_checked * 100) / (model.cyc + 1));
    $display("static: cycles=%0d checked=%0d lt_disp=%0d tt_disp=%0d mispred=%0d faults=%0d/%0d",
             sbench.model.cyc, sbench.model.n_checked, sbench.model.n_lt_disp, sbench.model.n_tt_disp, sbench.model.n_mispred, sbench.model.n_faults_det, sbench.model.n_faults_inj);
    $display("static: slack_hold=%0d slack_waived=%0d unresolved_branch_stall=%0d precaution=%0d lt_at_rob_limit=%0d chkq_full=%0d lvq_full=%0d",
             sbench.model.n_slack_hold, sbench.model.n_slack_waived, sbench.model.n_unres_stall, sbench.model.n_precaution, sbench.model.n_lt_cap, sbench.model.n_chkq_full, sbench.model.n_lvq_full);
    $display("static: icount_tt_first=%0d both_threads_one_cycle=%0d drain=%0d lvq_forwards=%0d misses=%0d ipc_x100=%0d",
             sbench.model.n_tt_first, sbench.model.n_both, sbench.model.n_drain, sbench.model.n_tt_load_fwd, sbench.model.n_miss, (sbench.model.n_checked * 100) / (sbench.model.cyc + 1));

    checks   += model.checks + sbench.model.checks;
    failures += model.failures + sbench.model.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired: a configuration did not finish (deadlock)");
    finish_report();
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (model.done && sbench.model.done);
    repeat (2) @(posedge clk);
    chk(model.n_checked === NPROG && sbench.model.n_checked === NPROG, "both programs fully checked");
    chk(model.n_slack_hold > 0 && sbench.model.n_slack_hold > 0, "slack dispatch held TT");
    chk(model.n_slack_waived > 0 || sbench.model.n_slack_waived > 0, "slack hold lifted for a blocked LT");
    chk(model.n_unres_stall > 0 && sbench.model.n_unres_stall > 0, "TT paused at an unresolved branch");
    chk(model.n_mispred > 0 && sbench.model.n_mispred > 0, "misprediction flushes");
    chk(model.n_precaution > 0, "precaution signal raised (dynamic)");
    chk(sbench.model.n_precaution === 0, "no precaution in static mode");
    chk(sbench.model.n_lt_cap > 0, "LT held at its ROB share (static)");
    chk(model.n_chkq_full > 0 || sbench.model.n_chkq_full > 0, "chkQ full");
    chk(model.n_lvq_full > 0 || sbench.model.n_lvq_full > 0, "LVQ full");
    chk(model.n_tt_first > 0 && sbench.model.n_tt_first > 0, "ICOUNT gave TT priority");
    chk(model.n_both > 0 && sbench.model.n_both > 0, "remaining slots used by the other thread");
    chk(model.n_tt_load_fwd > 0 && sbench.model.n_tt_load_fwd > 0, "LVQ forwarding to TT loads");
    chk(model.n_faults_det > 0 && sbench.model.n_faults_det > 0, "transient faults detected");
    chk(model.n_drain > 0 && sbench.model.n_drain > 0, "end-of-program drain");
    finish_report();
  end
endmodule
