// tb_ifq: self-checking test of the LT instruction fetch queue.
// Random pushes, pops and flushes against a reference queue; checks the
// occupancy, free count and every visible head entry each cycle.
module tb_ifq;
  import ftsmt_pkg::*;
  localparam int D = IFQ_DEPTH, PW = FETCH_W, OW = DISP_W;
  logic clk = 0, rst_n = 0, flush;
  logic [$clog2(PW+1)-1:0] push_cnt;
  qent_t push_ent [PW];
  logic [$clog2(OW+1)-1:0] pop_cnt;
  qent_t head_ent [OW];
  logic [$clog2(D+1)-1:0] count, free;
  int checks = 0, failures = 0;
  qent_t model [$];
  int full_seen = 0;

  ifq dut (.*);
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
    flush = 0; push_cnt = 0; pop_cnt = 0;
    foreach (push_ent[i]) push_ent[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int np, no;
      @(negedge clk);
      chk(int'(count) === model.size(), $sformatf("count %0d vs %0d", count, model.size()));
      chk(int'(free) === D - model.size(), "free");
      for (int i = 0; i < OW && i < model.size(); i++)
        chk(head_ent[i] === model[i], $sformatf("head %0d cyc %0d", i, cyc));
      if (model.size() == D) full_seen++;
      flush = ($urandom_range(0, 60) == 0);
      np = $urandom_range(0, PW);
      if (np > D - model.size() + 0) np = D - model.size();
      no = $urandom_range(0, (cyc % 1000 < 500) ? 3 : OW);
      if (no > model.size()) no = model.size();
      push_cnt = np; pop_cnt = no;
      foreach (push_ent[i]) push_ent[i] = qent_t'({$urandom, $urandom});
      @(posedge clk);
      if (flush) model.delete();
      else begin
        for (int i = 0; i < no; i++) void'(model.pop_front());
        for (int i = 0; i < np; i++) model.push_back(push_ent[i]);
      end
    end
    chk(full_seen > 0, "queue was filled at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
