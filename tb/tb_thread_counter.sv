// tb_thread_counter: self-checking test of the per-thread occupancy counter.
// Random dispatch increments and releases against reference counts.
module tb_thread_counter;
  localparam int SIZE = 128, INC = 8;
  logic clk = 0, rst_n = 0;
  logic [$clog2(INC+1)-1:0] inc_lt, inc_tt;
  logic [$clog2(SIZE+1)-1:0] dec_lt, dec_tt, cnt_lt, cnt_tt;
  int checks = 0, failures = 0;

  thread_counter #(.SIZE(SIZE), .INC_W(INC)) dut (.*);
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
    int rl = 0, rt = 0;
    inc_lt = 0; inc_tt = 0; dec_lt = 0; dec_tt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int il, it, dl, dt;
      @(negedge clk);
      chk(int'(cnt_lt) === rl && int'(cnt_tt) === rt, $sformatf("cyc %0d lt %0d/%0d tt %0d/%0d", cyc, cnt_lt, rl, cnt_tt, rt));
      dl = $urandom_range(0, rl); dt = $urandom_range(0, rt);
      if ($urandom_range(0, 1)) dl = (dl > 3) ? 3 : dl;
      il = $urandom_range(0, INC); it = $urandom_range(0, INC);
      if (rl + rt - dl - dt + il > SIZE) il = SIZE - (rl + rt - dl - dt);
      if (rl + rt - dl - dt + il + it > SIZE) it = SIZE - (rl + rt - dl - dt + il);
      inc_lt = il; inc_tt = it; dec_lt = dl; dec_tt = dt;
      @(posedge clk);
      rl = rl + il - dl; rt = rt + it - dt;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
