// tb_ftsmt_full: the fault-tolerant SMT core at its default configuration
// (32-entry IFQ, 256-entry trace queue, 8-wide dispatch, 128-entry ROB,
// 64-entry LQ/SQ/LVQ/chkQ, slack 128, dynamic deadlock monitoring) running a
// 20000-instruction synthetic program to completion with the behavioural back
// end: every instruction of the program is dispatched by both thread copies,
// retired, compared in the checking queue, and every injected fault detected.
module tb_ftsmt_full;
  import ftsmt_pkg::*;
  localparam int NPROG = 20000;
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
  ft_backend_model #(.NPROG(NPROG), .SEED(11)) model (.*);
  assign unres_stall = (dut.u_tq.count != '0) && (dut.u_tq.avail == '0);

  always #5 clk = ~clk;

  task automatic finish_report();
    $display("full: cycles=%0d checked=%0d lt_disp=%0d tt_disp=%0d mispred=%0d faults=%0d/%0d",
             model.cyc, model.n_checked, model.n_lt_disp, model.n_tt_disp, model.n_mispred, model.n_faults_det, model.n_faults_inj);
    $display("full: slack_hold=%0d slack_waived=%0d unresolved_branch_stall=%0d precaution=%0d lt_at_rob_limit=%0d chkq_full=%0d lvq_full=%0d",
             model.n_slack_hold, model.n_slack_waived, model.n_unres_stall, model.n_precaution, model.n_lt_cap, model.n_chkq_full, model.n_lvq_full);
    $display("full: icount_tt_first=%0d both_threads_one_cycle=%0d drain=%0d lvq_forwards=%0d misses=%0d ipc_x100=%0d",
             model.n_tt_first, model.n_both, model.n_drain, model.n_tt_load_fwd, model.n_miss, (model.n_checked * 100) / (model.cyc + 1));

    checks   += model.checks;
    failures += model.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired: the program did not finish (deadlock)");
    finish_report();
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (model.done);
    repeat (2) @(posedge clk);
    checks++;
    if (model.n_checked !== NPROG) begin failures++; $display("FAIL: program not fully checked"); end
    finish_report();
  end
endmodule
