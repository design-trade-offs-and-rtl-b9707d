// tb_seq_copy: self-checking test of the fetch copy unit.
// Drives random fetch bundles, queue free counts and redirects; a reference
// sequence counter predicts the numbers, tags, acceptance and push counts.
module tb_seq_copy;
  import ftsmt_pkg::*;
  localparam int W = FETCH_W;
  logic clk = 0, rst_n = 0;
  logic [$clog2(W+1)-1:0] fetch_cnt;
  fetch_t fetch_bundle [W];
  logic fetch_ready, redirect;
  logic [$clog2(IFQ_DEPTH+1)-1:0] ifq_free;
  logic [$clog2(TQ_DEPTH+1)-1:0] tq_free;
  seq_t redirect_seq;
  logic [$clog2(W+1)-1:0] push_cnt;
  qent_t lt_ent [W];
  qent_t tt_ent [W];
  int checks = 0, failures = 0;

  seq_copy dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seq_t ref_seq = '0;
    logic exp_ready;
    fetch_cnt = '0; redirect = 0; redirect_seq = '0; ifq_free = '0; tq_free = '0;
    foreach (fetch_bundle[i]) fetch_bundle[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      fetch_cnt = $urandom_range(0, W);
      foreach (fetch_bundle[i]) fetch_bundle[i] = fetch_t'({$urandom, 3'($urandom)});
      ifq_free = $urandom_range(0, IFQ_DEPTH);
      tq_free  = $urandom_range(0, TQ_DEPTH);
      redirect = ($urandom_range(0, 15) == 0);
      redirect_seq = seq_t'($urandom);
      #1;
      exp_ready = !redirect && (ifq_free >= fetch_cnt) && (tq_free >= fetch_cnt);
      chk(fetch_ready === exp_ready, $sformatf("ready cyc %0d", cyc));
      chk(push_cnt === (exp_ready ? fetch_cnt : 0), "push_cnt");
      for (int i = 0; i < W; i++) begin
        chk(lt_ent[i].seq === seq_t'(ref_seq + i) && tt_ent[i].seq === seq_t'(ref_seq + i),
            $sformatf("seq slot %0d cyc %0d", i, cyc));
        chk(lt_ent[i].tid === THR_LT && tt_ent[i].tid === THR_TT, "tid");
        chk(lt_ent[i].f === fetch_bundle[i] && tt_ent[i].f === fetch_bundle[i], "payload");
        chk(!lt_ent[i].resolved && !tt_ent[i].resolved, "resolved cleared");
      end
      if (redirect) ref_seq = redirect_seq + 1;
      else if (exp_ready) ref_seq = ref_seq + seq_t'(fetch_cnt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
