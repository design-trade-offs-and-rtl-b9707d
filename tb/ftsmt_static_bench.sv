// ftsmt_static_bench: the fault-tolerant core configured for static resource
// partitioning (entries of ROB, LQ and SQ reserved for the trailing thread),
// driven by the back-end model.  Used by the end-to-end testbench next to the
// default, dynamically monitored configuration.  Clock and reset come from
// the instantiating testbench; the model holds the checks and statistics.
module ftsmt_static_bench
  import ftsmt_pkg::*;
#(
  parameter int NPROG = 1500
) (
  input logic clk,
  input logic rst_n
);
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

  ftsmt_top #(.DL_MODE(DL_STATIC)) dut (.*);
  ft_backend_model #(.NPROG(NPROG), .SEED(7)) model (.*);
  assign unres_stall = (dut.u_tq.count != '0) && (dut.u_tq.avail == '0);
endmodule
