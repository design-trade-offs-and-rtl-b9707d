// ft_backend_model: behavioural model of the processor around the
// fault-tolerant dispatch/check core, for testbenches only.
//
// It plays the instruction fetch unit and the conventional out-of-order back
// end: it fetches a synthetic program of NPROG instructions (branches, loads,
// stores, ALU operations; some branches mispredicted, after which it fetches a
// wrong path until the branch is reported), and for every dispatched
// instruction models issue after 1-4 cycles, completion after 1-3 cycles (LT
// loads occasionally miss for 100 cycles), LT loads filling the LVQ, TT loads
// reading it, in-order branch reporting for LT, and in-order retirement of
// both threads within the chkQ limits.  Now and then a TT result is corrupted
// (a transient fault); the instruction is then retried with the correct result.
//
// Checks made here: TT dispatches exactly the correct-path program, in order,
// under the same sequence numbers as LT; LT retires exactly the correct path;
// TT loads receive LT's load values; every injected fault is reported with its
// sequence number; the whole program is compared.  It also counts how often
// each mechanism of the core was exercised.  All outputs change with
// non-blocking assignments at the rising edge.
module ft_backend_model
  import ftsmt_pkg::*;
#(
  parameter int       NPROG = 2000,
  parameter int       SEED  = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [$clog2(FETCH_W+1)-1:0] fetch_cnt,
  output fetch_t      fetch_bundle [FETCH_W],
  input  logic        fetch_ready,
  output logic        drain,
  output logic        br_valid,
  output seq_t        br_seq,
  output logic        br_mispred,
  input  logic        disp_valid [DISP_W],
  input  qent_t       disp_ent [DISP_W],
  input  logic [$clog2(DISP_W+1)-1:0] disp_lt_cnt,
  input  logic [$clog2(DISP_W+1)-1:0] disp_tt_cnt,
  output logic [$clog2(IQ_SIZE+1)-1:0]  iq_issue_lt,
  output logic [$clog2(IQ_SIZE+1)-1:0]  iq_issue_tt,
  output logic [$clog2(ROB_SIZE+1)-1:0] rob_rel_lt,
  output logic [$clog2(ROB_SIZE+1)-1:0] rob_rel_tt,
  output logic [$clog2(LQ_SIZE+1)-1:0]  lq_rel_lt,
  output logic [$clog2(LQ_SIZE+1)-1:0]  lq_rel_tt,
  output logic [$clog2(SQ_SIZE+1)-1:0]  sq_rel_lt,
  output logic [$clog2(SQ_SIZE+1)-1:0]  sq_rel_tt,
  output logic        lvq_wr_valid,
  output seq_t        lvq_wr_seq,
  output data_t       lvq_wr_data,
  input  logic        lvq_full,
  output logic        lvq_rd_valid,
  output seq_t        lvq_rd_seq,
  input  logic        lvq_rd_hit,
  input  data_t       lvq_rd_data,
  output logic [$clog2(RET_W+1)-1:0] lt_ret_cnt,
  output ret_t        lt_ret [RET_W],
  output logic [$clog2(RET_W+1)-1:0] tt_ret_cnt,
  output ret_t        tt_ret [RET_W],
  output logic        chk_flush,
  input  logic [$clog2(CHKQ_DEPTH+1)-1:0] chkq_free,
  input  logic [$clog2(CHKQ_DEPTH+1)-1:0] chkq_count,
  input  logic [$clog2(RET_W+1)-1:0] checked_cnt,
  input  logic        fault_valid,
  input  seq_t        fault_seq,
  input  logic        precaution,
  input  logic [2:0]  caution,
  input  thread_e     sched_sel,
  input  logic        slack_hold,
  input  logic        slack_waived,
  input  logic        unres_stall,
  input  logic [$clog2(TQ_DEPTH+1)-1:0]  distance,
  input  logic [$clog2(IQ_SIZE+1)-1:0]   icount_lt,
  input  logic [$clog2(IQ_SIZE+1)-1:0]   icount_tt,
  input  logic [$clog2(ROB_SIZE+1)-1:0]  rob_lt_cnt,
  input  logic [$clog2(ROB_SIZE+1)-1:0]  rob_tt_cnt,
  input  logic [$clog2(LQ_SIZE+1)-1:0]   lq_lt_cnt,
  input  logic [$clog2(SQ_SIZE+1)-1:0]   sq_lt_cnt,
  input  logic [$clog2(LVQ_DEPTH+1)-1:0] lvq_count
);

  // ---------------- synthetic program ----------------
  function automatic logic [31:0] hsh(int idx, int salt);
    logic [31:0] x;
    x = 32'(idx) * 32'h9E3779B1 + 32'(salt) * 32'h85EBCA6B + 32'(SEED);
    x = x ^ (x >> 15);
    x = x * 32'h2C1B3C6D;
    return x ^ (x >> 13);
  endfunction
  function automatic logic p_branch(int idx);  return (idx % 7) == 3;                  endfunction
  function automatic logic p_mispred(int idx); return p_branch(idx) && (hsh(idx, 1) % 4 == 0); endfunction
  function automatic logic p_load(int idx);
    if (p_branch(idx)) return 1'b0;
    if (idx >= NPROG / 2 && idx < NPROG / 2 + 400) return hsh(idx, 2) % 3 != 0;  // load-heavy phase
    return hsh(idx, 2) % 4 == 0;
  endfunction
  function automatic logic p_store(int idx);   return !p_branch(idx) && !p_load(idx) && (hsh(idx, 3) % 6 == 0); endfunction
  function automatic data_t p_ldval(int idx);  return hsh(idx, 4);                          endfunction
  function automatic data_t p_result(int idx); return p_load(idx) ? p_ldval(idx) : hsh(idx, 5); endfunction
  function automatic insn_t p_word(int idx);   return {8'h00, 24'(idx)};                    endfunction

  typedef struct {
    seq_t seq;
    int   idx;
    logic wrong, br, ld, st;
    int   issue_cyc, done_cyc;
    logic issued, lvq_done, rep_sel, rep_obs, retry;
    data_t value;
  } ent_t;

  ent_t rob [2][$];
  int   cyc;
  int   fptr, bptr;        // next correct-path fetch index; bundle's next index
  logic fwrong, bwrong;    // fetching a wrong path; bundle ends on a wrong path
  logic lvq_wr_pend, lvq_rd_pend;  // an LVQ request is in flight this cycle
  seq_t inj_seq;
  logic inj_pending;
  int   lt_seq_of [];
  int   tt_expect, lt_expect;

  // statistics
  int checks, failures;
  int n_checked, n_lt_disp, n_tt_disp, n_mispred, n_faults_inj, n_faults_det;
  int n_slack_hold, n_unres_stall, n_precaution, n_lt_cap, n_chkq_full, n_lvq_full;
  int n_tt_first, n_both, n_drain, n_tt_load_fwd, n_miss, n_slack_waived;
  logic done;

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL [%0d]: %s", cyc, msg);
    end
  endtask

  function automatic logic ent_done(ref ent_t e, input int c, input int thr);
    if (!e.issued || c < e.done_cyc) return 1'b0;
    if (e.ld && !e.lvq_done) return 1'b0;
    if (thr == 0 && e.br && !e.wrong && !e.rep_obs) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    lt_seq_of = new[NPROG];
    foreach (lt_seq_of[i]) lt_seq_of[i] = -1;
    cyc = 0; fptr = 0; fwrong = 0; bptr = 0; bwrong = 0;
    lvq_wr_pend = 0; lvq_rd_pend = 0; inj_pending = 0; inj_seq = '0;
    tt_expect = 0; lt_expect = 0; checks = 0; failures = 0; done = 0;
    n_checked = 0; n_lt_disp = 0; n_tt_disp = 0; n_mispred = 0; n_faults_inj = 0; n_faults_det = 0;
    n_slack_hold = 0; n_unres_stall = 0; n_precaution = 0; n_lt_cap = 0; n_chkq_full = 0;
    n_lvq_full = 0; n_slack_waived = 0; n_tt_first = 0; n_both = 0; n_drain = 0; n_tt_load_fwd = 0; n_miss = 0;
    fetch_cnt = '0; drain = 0; br_valid = 0; br_seq = '0; br_mispred = 0;
    foreach (fetch_bundle[i]) fetch_bundle[i] = '0;
    iq_issue_lt = '0; iq_issue_tt = '0; rob_rel_lt = '0; rob_rel_tt = '0;
    lq_rel_lt = '0; lq_rel_tt = '0; sq_rel_lt = '0; sq_rel_tt = '0;
    lvq_wr_valid = 0; lvq_wr_seq = '0; lvq_wr_data = '0; lvq_rd_valid = 0; lvq_rd_seq = '0;
    lt_ret_cnt = '0; tt_ret_cnt = '0; chk_flush = 0;
    foreach (lt_ret[i]) begin lt_ret[i] = '0; tt_ret[i] = '0; end
  end

  always @(posedge clk) if (rst_n) begin
    int iq_i [2];
    int rob_r [2];
    int lq_r [2];
    int sq_r [2];
    int n, pos, nf, lim, lvq_next;
    logic redir_now, drive_redir;
    ret_t lr [RET_W];
    ret_t tr [RET_W];
    for (int t = 0; t < 2; t++) begin iq_i[t] = 0; rob_r[t] = 0; lq_r[t] = 0; sq_r[t] = 0; end
    redir_now = br_valid && br_mispred;

    // ---------- A. observe the cycle that is ending ----------
    // statistics on the core's state
    if (slack_hold && (distance != '0 || drain == 0) && !drain) n_slack_hold++;
    if (unres_stall) n_unres_stall++;
    if (slack_waived) n_slack_waived++;
    if (precaution) n_precaution++;
    if (32'(rob_lt_cnt) + 32'(DISP_W) >= 32'(ROB_SIZE)) n_lt_cap++;
    if (chkq_free == '0) n_chkq_full++;
    if (lvq_full) n_lvq_full++;
    if (drain) n_drain++;
    if (sched_sel == THR_TT && disp_tt_cnt != '0) n_tt_first++;
    if (disp_lt_cnt != '0 && disp_tt_cnt != '0) n_both++;

    // LVQ transactions
    if (lvq_wr_valid && lvq_wr_pend && !redir_now)
      foreach (rob[0][i]) if (rob[0][i].seq == lvq_wr_seq && rob[0][i].ld) rob[0][i].lvq_done = 1'b1;
    if (lvq_rd_valid && lvq_rd_pend && lvq_rd_hit)
      foreach (rob[1][i]) if (rob[1][i].seq == lvq_rd_seq && rob[1][i].ld) begin
        rob[1][i].lvq_done = 1'b1;
        rob[1][i].value    = lvq_rd_data;
        chk(lvq_rd_data === p_ldval(rob[1][i].idx), $sformatf("TT load %0d value", rob[1][i].idx));
        n_tt_load_fwd++;
      end

    // TT retirement check results
    if (tt_ret_cnt != '0) begin
      chk(fault_valid === inj_pending, "fault detection matches injection");
      if (fault_valid && inj_pending) begin
        chk(fault_seq === inj_seq, "fault sequence number");
        n_faults_det++;
        for (int i = 0; i < int'(checked_cnt) + 1 && i < rob[1].size(); i++)
          if (rob[1][i].seq == inj_seq) rob[1][i].retry = 1'b1;
      end
      inj_pending = 1'b0;
      for (int i = 0; i < int'(checked_cnt); i++) begin
        automatic ent_t e = rob[1].pop_front();
        rob_r[1]++; if (e.ld) lq_r[1]++; if (e.st) sq_r[1]++;
        n_checked++;
      end
    end

    // branch report
    if (br_valid) begin
      pos = -1;
      foreach (rob[0][i]) if (rob[0][i].seq == br_seq && rob[0][i].br && !rob[0][i].wrong) pos = i;
      chk(pos >= 0, "reported branch in LT ROB");
      if (pos >= 0) begin
        rob[0][pos].rep_obs = 1'b1;
        if (br_mispred) begin
          n_mispred++;
          while (rob[0].size() > pos + 1) begin
            automatic ent_t e = rob[0].pop_back();
            chk(e.wrong, "only wrong-path LT instructions squashed");
            if (!e.issued) iq_i[0]++;
            rob_r[0]++; if (e.ld) lq_r[0]++; if (e.st) sq_r[0]++;
          end
          fptr = rob[0][pos].idx + 1; fwrong = 0;
        end
      end
    end

    // fetch
    if (fetch_ready && fetch_cnt != '0) begin
      fptr = bptr; fwrong = bwrong;
    end

    // dispatch
    for (int s = 0; s < DISP_W; s++) if (disp_valid[s]) begin
      ent_t e;
      automatic qent_t q = disp_ent[s];
      automatic int thr = (q.tid == THR_TT) ? 1 : 0;
      e.seq = q.seq; e.wrong = q.f.word[31]; e.idx = int'(q.f.word[23:0]);
      e.br = q.f.is_branch; e.ld = q.f.is_load; e.st = q.f.is_store;
      e.issue_cyc = cyc + 1 + $urandom_range(0, 3);
      e.done_cyc  = e.issue_cyc + 1 + $urandom_range(0, 2);
      if (thr == 0 && e.ld && $urandom_range(0, 15) == 0) begin e.done_cyc += 100; n_miss++; end
      // some LT branches wait on a missing load before they resolve
      if (thr == 0 && e.br && $urandom_range(0, 5) == 0) e.done_cyc += 60;
      e.issued = 0; e.lvq_done = 0; e.rep_sel = 0; e.rep_obs = 0; e.retry = 0; e.value = '0;
      if (thr == 0) begin
        n_lt_disp++;
        if (!e.wrong) begin
          chk(e.idx === lt_expect, $sformatf("LT correct path in order: %0d vs %0d", e.idx, lt_expect));
          lt_seq_of[e.idx] = int'(e.seq);
          lt_expect = e.idx + 1;
        end
      end else begin
        n_tt_disp++;
        chk(!e.wrong, "TT never dispatches a wrong-path instruction");
        chk(e.idx === tt_expect, $sformatf("TT dispatch order: %0d vs %0d", e.idx, tt_expect));
        chk(lt_seq_of[e.idx] === int'(e.seq), "TT copy carries LT's sequence number");
        tt_expect++;
      end
      rob[thr].push_back(e);
    end

    // ---------- B. advance the back end ----------
    for (int t = 0; t < 2; t++)
      foreach (rob[t][i]) if (!rob[t][i].issued && cyc >= rob[t][i].issue_cyc) begin
        rob[t][i].issued = 1'b1;
        iq_i[t]++;
      end

    // ---------- C. branch report (oldest completed, unreported LT branch) ----------
    drive_redir = 1'b0;
    br_valid <= 1'b0; br_mispred <= 1'b0;
    foreach (rob[0][i]) if (rob[0][i].br && !rob[0][i].wrong && !rob[0][i].rep_sel) begin
      if (rob[0][i].issued && cyc >= rob[0][i].done_cyc && !redir_now) begin
        rob[0][i].rep_sel = 1'b1;
        br_valid   <= 1'b1;
        br_seq     <= rob[0][i].seq;
        br_mispred <= p_mispred(rob[0][i].idx);
        drive_redir = p_mispred(rob[0][i].idx);
      end
      break;
    end

    // ---------- D. LVQ requests ----------
    lvq_next = int'(lvq_count) + ((lvq_wr_valid && !redir_now) ? 1 : 0) - ((lvq_rd_valid && lvq_rd_hit) ? 1 : 0);
    lvq_wr_valid <= 1'b0; lvq_wr_pend = 1'b0;
    if (!drive_redir && lvq_next < LVQ_DEPTH)
      foreach (rob[0][i]) if (rob[0][i].ld && !rob[0][i].lvq_done && rob[0][i].issued && cyc >= rob[0][i].done_cyc) begin
        lvq_wr_valid <= 1'b1;
        lvq_wr_seq   <= rob[0][i].seq;
        lvq_wr_data  <= rob[0][i].wrong ? data_t'($urandom) : p_ldval(rob[0][i].idx);
        lvq_wr_pend   = 1'b1;
        break;
      end
    lvq_rd_valid <= 1'b0; lvq_rd_pend = 1'b0;
    foreach (rob[1][i]) if (rob[1][i].ld && !rob[1][i].lvq_done && rob[1][i].issued && cyc >= rob[1][i].done_cyc) begin
      lvq_rd_valid <= 1'b1;
      lvq_rd_seq   <= rob[1][i].seq;
      lvq_rd_pend   = 1'b1;
      break;
    end

    // ---------- E. LT retirement ----------
    lim = int'(chkq_free) - int'(lt_ret_cnt) + int'(checked_cnt);
    n = 0;
    while (n < RET_W && n < lim && rob[0].size() > 0 && ent_done(rob[0][0], cyc, 0)) begin
      automatic ent_t e = rob[0].pop_front();
      chk(!e.wrong, "LT retires only the correct path");
      lr[n].seq = e.seq; lr[n].word = p_word(e.idx); lr[n].result = p_result(e.idx);
      rob_r[0]++; if (e.ld) lq_r[0]++; if (e.st) sq_r[0]++;
      n++;
    end
    for (int i = n; i < RET_W; i++) lr[i] = '0;
    lt_ret_cnt <= n[$clog2(RET_W+1)-1:0];
    lt_ret     <= lr;

    // ---------- F. TT retirement (checked against chkQ) ----------
    lim = int'(chkq_count) + int'(lt_ret_cnt) - int'(checked_cnt);
    n = 0;
    while (n < RET_W && n < lim && n < rob[1].size() && ent_done(rob[1][n], cyc, 1)) begin
      tr[n].seq = rob[1][n].seq; tr[n].word = p_word(rob[1][n].idx);
      tr[n].result = rob[1][n].ld ? rob[1][n].value : p_result(rob[1][n].idx);
      n++;
    end
    if (n > 0 && !inj_pending && $urandom_range(0, 150) == 0) begin
      automatic int b = $urandom_range(0, n - 1);
      if (!rob[1][b].retry) begin
        tr[b].result ^= data_t'(1) << $urandom_range(0, DATA_W - 1);
        inj_pending = 1'b1;
        inj_seq = tr[b].seq;
        n_faults_inj++;
        n = b + 1;
      end
    end
    for (int i = n; i < RET_W; i++) tr[i] = '0;
    tt_ret_cnt <= n[$clog2(RET_W+1)-1:0];
    tt_ret     <= tr;

    // ---------- G. fetch ----------
    fetch_cnt <= '0;
    nf = (fptr < NPROG || fwrong) ? $urandom_range(0, FETCH_W) : 0;
    if ($urandom_range(0, 9) < 2) nf = 0;
    bptr = fptr; bwrong = fwrong;
    for (int s = 0; s < FETCH_W; s++) begin
      fetch_t f;
      f = '0;
      if (s < nf && (bwrong || bptr < NPROG)) begin
        if (bwrong) begin
          f.word = {1'b1, 7'h0, 24'($urandom)};
          f.is_branch = ($urandom_range(0, 6) == 0);
          f.is_load   = !f.is_branch && ($urandom_range(0, 3) == 0);
          f.is_store  = !f.is_branch && !f.is_load && ($urandom_range(0, 5) == 0);
        end else begin
          f.word = p_word(bptr);
          f.is_branch = p_branch(bptr); f.is_load = p_load(bptr); f.is_store = p_store(bptr);
          if (p_mispred(bptr)) bwrong = 1'b1;
          bptr++;
        end
      end else if (s < nf) begin
        nf = s;
      end
      fetch_bundle[s] <= f;
    end
    fetch_cnt <= nf[$clog2(FETCH_W+1)-1:0];
    drain <= (fptr >= NPROG) && !fwrong;

    // ---------- H. occupancy reports ----------
    iq_issue_lt <= iq_i[0][$clog2(IQ_SIZE+1)-1:0];
    iq_issue_tt <= iq_i[1][$clog2(IQ_SIZE+1)-1:0];
    rob_rel_lt <= rob_r[0][$clog2(ROB_SIZE+1)-1:0];
    rob_rel_tt <= rob_r[1][$clog2(ROB_SIZE+1)-1:0];
    lq_rel_lt  <= lq_r[0][$clog2(LQ_SIZE+1)-1:0];
    lq_rel_tt  <= lq_r[1][$clog2(LQ_SIZE+1)-1:0];
    sq_rel_lt  <= sq_r[0][$clog2(SQ_SIZE+1)-1:0];
    sq_rel_tt  <= sq_r[1][$clog2(SQ_SIZE+1)-1:0];

    if (n_checked == NPROG && !done) begin
      done = 1'b1;
      chk(tt_expect === NPROG && lt_expect === NPROG, "whole program dispatched by both copies");
      chk(rob[0].size() === 0 && rob[1].size() === 0, "both ROBs drained");
      chk(n_faults_det === n_faults_inj, "every injected fault detected");
    end
    cyc++;
  end

endmodule
