// tb_trace_queue: self-checking test of the trailing-thread trace queue.
// A reference queue mirrors pushes, pops, branch resolution and
// misprediction flushes.  Every cycle the test checks occupancy, the visible
// head entries with their resolve bits, and the dispatchable run, which must
// stop before the first unresolved branch.
module tb_trace_queue;
  import ftsmt_pkg::*;
  localparam int D = TQ_DEPTH, PW = FETCH_W, OW = DISP_W;
  logic clk = 0, rst_n = 0;
  logic [$clog2(PW+1)-1:0] push_cnt;
  qent_t push_ent [PW];
  logic res_valid, res_mispred, res_hit;
  seq_t res_seq;
  logic [$clog2(OW+1)-1:0] pop_cnt, avail;
  qent_t head_ent [OW];
  logic [$clog2(D+1)-1:0] count, free;
  int checks = 0, failures = 0;
  qent_t model [$];
  int n_flush = 0, n_resolve = 0, n_stall = 0;

  trace_queue dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seq_t nseq = 0;
    push_cnt = 0; pop_cnt = 0; res_valid = 0; res_mispred = 0; res_seq = 0;
    foreach (push_ent[i]) push_ent[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int np, no, exp_avail, bidx;
      int br [$];
      @(negedge clk);
      // expected dispatchable run
      exp_avail = 0;
      for (int i = 0; i < OW && i < model.size(); i++) begin
        if (model[i].f.is_branch && !model[i].resolved) break;
        exp_avail++;
      end
      if (exp_avail < OW && exp_avail < model.size()) n_stall++;
      chk(int'(count) === model.size(), $sformatf("count %0d vs %0d cyc %0d", count, model.size(), cyc));
      chk(int'(free) === D - model.size(), "free");
      chk(int'(avail) === exp_avail, $sformatf("avail %0d vs %0d cyc %0d", avail, exp_avail, cyc));
      for (int i = 0; i < OW && i < model.size(); i++)
        chk(head_ent[i] === model[i], $sformatf("head %0d cyc %0d", i, cyc));
      // stimulus
      np = $urandom_range(0, PW);
      if (np > D - model.size()) np = D - model.size();
      no = $urandom_range(0, exp_avail);
      if (cyc % 2000 > 1200) no = (exp_avail > 1) ? 1 : exp_avail;
      push_cnt = np; pop_cnt = no;
      for (int i = 0; i < PW; i++) begin
        push_ent[i] = '0;
        push_ent[i].seq = nseq + seq_t'(i);
        push_ent[i].tid = THR_TT;
        push_ent[i].f.word = $urandom;
        push_ent[i].f.is_branch = ($urandom_range(0, 5) == 0);
        push_ent[i].f.is_load = ($urandom_range(0, 3) == 0);
      end
      // pick an unresolved branch beyond the popped part to resolve
      br.delete();
      foreach (model[i]) if (i >= no && model[i].f.is_branch && !model[i].resolved) br.push_back(i);
      res_valid = (br.size() > 0) && ($urandom_range(0, 2) == 0);
      bidx = res_valid ? br[$urandom_range(0, br.size() - 1)] : 0;
      res_seq = res_valid ? model[bidx].seq : seq_t'($urandom);
      res_mispred = res_valid && ($urandom_range(0, 3) == 0);
      #1;
      chk(res_hit === res_valid, "search hit");
      @(posedge clk);
      if (res_valid) begin
        n_resolve++;
        model[bidx].resolved = 1'b1;
        if (res_mispred) begin
          n_flush++;
          while (model.size() > bidx + 1) void'(model.pop_back());
          nseq = model[bidx].seq + 1;
        end
      end
      for (int i = 0; i < no; i++) void'(model.pop_front());
      if (!(res_valid && res_mispred)) begin
        for (int i = 0; i < np; i++) model.push_back(push_ent[i]);
        nseq = nseq + seq_t'(np);
      end
    end
    chk(n_flush > 10 && n_resolve > 50 && n_stall > 50, "flush, resolve and branch stall exercised");
    $display("flushes=%0d resolves=%0d stalls=%0d", n_flush, n_resolve, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
