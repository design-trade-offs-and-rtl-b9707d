// tb_dispatch_unit: self-checking test of the dispatch slot filling.
// Random queue heads (with loads and stores), eligibility, first thread and
// resource levels.  The reference walks the slots one at a time with its own
// copies of every free count, handing each slot to the first thread until it
// blocks, then to the other, and predicts the filled slots, the per-thread
// counts and the load/store counts.
module tb_dispatch_unit;
  import ftsmt_pkg::*;
  localparam int W = DISP_W;
  thread_e first;
  logic lt_ok, tt_ok;
  qent_t ifq_ent [W];
  qent_t tq_ent [W];
  logic [5:0] ifq_count;
  logic [3:0] tq_avail;
  logic [6:0] iq_free;
  logic [7:0] rob_free, rob_lt_room;
  logic [6:0] lq_free, lq_lt_room, sq_free, sq_lt_room;
  logic disp_valid [W];
  qent_t disp_ent [W];
  logic [3:0] lt_cnt, tt_cnt, lt_loads, lt_stores, tt_loads, tt_stores;
  int checks = 0, failures = 0;
  int n_split = 0, n_res_stall = 0;

  dispatch_unit dut (.*);

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pick_small(int hi);
    return ($urandom_range(0, 2) == 0) ? $urandom_range(0, 4) : $urandom_range(0, hi);
  endfunction

  initial begin
    for (int n = 0; n < 6000; n++) begin
      int iq, rob, robl, lq, lql, sq, sql, slot;
      int cnt [2];
      int ld [2];
      int st [2];
      qent_t exp_ent [W];
      logic  exp_v [W];
      first = ($urandom_range(0, 1)) ? THR_TT : THR_LT;
      lt_ok = ($urandom_range(0, 4) != 0);
      tt_ok = ($urandom_range(0, 4) != 0);
      for (int i = 0; i < W; i++) begin
        ifq_ent[i] = qent_t'({$urandom, $urandom});
        ifq_ent[i].tid = THR_LT;
        ifq_ent[i].f.is_branch = 0;
        tq_ent[i] = qent_t'({$urandom, $urandom});
        tq_ent[i].tid = THR_TT;
        tq_ent[i].f.is_store = tq_ent[i].f.is_store & ~tq_ent[i].f.is_load;
        ifq_ent[i].f.is_store = ifq_ent[i].f.is_store & ~ifq_ent[i].f.is_load;
      end
      ifq_count = 6'(pick_small(32));
      tq_avail  = 4'(pick_small(8));
      iq_free   = 7'(pick_small(64));
      rob_free  = 8'(pick_small(128));
      rob_lt_room = 8'($urandom_range(0, rob_free));
      lq_free   = 7'(pick_small(64));
      lq_lt_room = 7'($urandom_range(0, lq_free));
      sq_free   = 7'(pick_small(64));
      sq_lt_room = 7'($urandom_range(0, sq_free));
      #1;
      // reference
      iq = iq_free; rob = rob_free; robl = rob_lt_room; lq = lq_free; lql = lq_lt_room;
      sq = sq_free; sql = sq_lt_room; slot = 0;
      for (int t = 0; t < 2; t++) begin cnt[t] = 0; ld[t] = 0; st[t] = 0; end
      for (int i = 0; i < W; i++) begin exp_v[i] = 0; exp_ent[i] = '0; end
      for (int p = 0; p < 2; p++) begin
        automatic thread_e th = (p == 0) ? first : thread_e'(~first);
        automatic int lim = (th == THR_LT) ? (lt_ok ? int'(ifq_count) : 0) : (tt_ok ? int'(tq_avail) : 0);
        for (int i = 0; i < lim && slot < W; i++) begin
          automatic qent_t e = (th == THR_LT) ? ifq_ent[i] : tq_ent[i];
          automatic bit is_lt = (th == THR_LT);
          if (iq == 0 || rob == 0 || (is_lt && robl == 0)) break;
          if (e.f.is_load && (lq == 0 || (is_lt && lql == 0))) break;
          if (e.f.is_store && (sq == 0 || (is_lt && sql == 0))) break;
          iq--; rob--; robl -= is_lt;
          // an LT-only room can never exceed the free count
          if (robl > rob) robl = rob;
          if (e.f.is_load)  begin lq--; lql -= is_lt; if (lql > lq) lql = lq; ld[th]++; end
          if (e.f.is_store) begin sq--; sql -= is_lt; if (sql > sq) sql = sq; st[th]++; end
          exp_v[slot] = 1; exp_ent[slot] = e; slot++; cnt[th]++;
        end
      end
      if (cnt[0] > 0 && cnt[1] > 0) n_split++;
      if (slot < W && ((lt_ok && cnt[0] < ifq_count) || (tt_ok && cnt[1] < tq_avail))) n_res_stall++;
      chk(int'(lt_cnt) === cnt[0] && int'(tt_cnt) === cnt[1],
          $sformatf("counts %0d: lt %0d/%0d tt %0d/%0d", n, lt_cnt, cnt[0], tt_cnt, cnt[1]));
      chk(int'(lt_loads) === ld[0] && int'(tt_loads) === ld[1], "load counts");
      chk(int'(lt_stores) === st[0] && int'(tt_stores) === st[1], "store counts");
      for (int i = 0; i < W; i++) begin
        chk(disp_valid[i] === exp_v[i], $sformatf("valid slot %0d case %0d", i, n));
        if (exp_v[i]) chk(disp_ent[i] === exp_ent[i], $sformatf("entry slot %0d case %0d", i, n));
      end
    end
    chk(n_split > 100 && n_res_stall > 100, "slot sharing and resource stalls reached");
    $display("split=%0d resource_stalls=%0d", n_split, n_res_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
