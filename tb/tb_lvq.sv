// tb_lvq: self-checking test of the load value queue.
// LT loads deposit random values under unique sequence numbers; TT loads look
// them up in a different, shuffled order.  A reference associative array
// predicts hits, returned values, occupancy and the full flag; the queue is
// driven to full so the LT stall condition is seen.
module tb_lvq;
  import ftsmt_pkg::*;
  localparam int D = LVQ_DEPTH;
  logic clk = 0, rst_n = 0;
  logic wr_valid, rd_valid, rd_hit, full, squash_valid;
  seq_t wr_seq, rd_seq, squash_seq;
  data_t wr_data, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0, n_full = 0, n_hit = 0, n_squash = 0;
  data_t model [seq_t];
  seq_t pending [$];

  lvq dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seq_t nseq = 0;
    wr_valid = 0; rd_valid = 0; squash_valid = 0; squash_seq = 0; wr_seq = 0; rd_seq = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      int pick;
      logic phase_fill;
      @(negedge clk);
      chk(int'(count) === model.num(), $sformatf("count %0d vs %0d", count, model.num()));
      chk(full === (model.num() === D), "full flag");
      if (full) n_full++;
      phase_fill = (cyc % 800) < 400;
      wr_valid = !full && ($urandom_range(0, 9) < (phase_fill ? 9 : 3));
      wr_seq   = nseq;
      wr_data  = $urandom;
      rd_valid = ($urandom_range(0, 9) < (phase_fill ? 2 : 8));
      pick = 0;
      if (pending.size() > 0 && $urandom_range(0, 7) != 0) begin
        pick = $urandom_range(0, pending.size() - 1);
        rd_seq = pending[pick];
      end else begin
        rd_seq = nseq + 300;   // never written: must miss
        pick = -1;
      end
      // occasionally squash the youngest few outstanding loads
      squash_valid = (pending.size() > 4) && ($urandom_range(0, 60) == 0);
      squash_seq   = nseq - seq_t'($urandom_range(1, 4));
      if (squash_valid && pick >= 0 && seq_older(squash_seq, rd_seq)) rd_valid = 0;
      #1;
      if (rd_valid) begin
        if (pick >= 0) begin
          chk(rd_hit, $sformatf("hit seq %0d", rd_seq));
          chk(rd_data === model[rd_seq], "value");
        end else chk(!rd_hit, "miss for unknown tag");
      end else chk(!rd_hit, "no hit without lookup");
      @(posedge clk);
      if (rd_valid && pick >= 0) begin
        n_hit++;
        model.delete(rd_seq);
        pending.delete(pick);
      end
      if (squash_valid) begin
        n_squash++;
        for (int i = pending.size() - 1; i >= 0; i--)
          if (seq_older(squash_seq, pending[i])) begin
            model.delete(pending[i]);
            pending.delete(i);
          end
        nseq = squash_seq + 1;
      end else if (wr_valid) begin
        model[wr_seq] = wr_data;
        pending.push_back(wr_seq);
        nseq++;
      end
    end
    chk(n_full > 20 && n_hit > 1000 && n_squash > 20, "queue filled, drained and squashed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
