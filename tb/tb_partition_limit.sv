// tb_partition_limit: self-checking test of static partitioning.
// For random occupancies the LT room must be min(free, SIZE-RSV-cnt_lt) and
// TT may use all free entries; also checks that LT filling its share leaves
// RSV entries for TT.
module tb_partition_limit;
  localparam int SIZE = 128, RSV = 8;
  logic [7:0] cnt_lt, cnt_tt, free, lt_room;
  int checks = 0, failures = 0;

  partition_limit #(.SIZE(SIZE), .RSV(RSV)) dut (.*);

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l <= SIZE; l++)
      for (int t = 0; t + l <= SIZE; t += 3) begin
        int ef, cap, er;
        cnt_lt = 8'(l); cnt_tt = 8'(t);
        #1;
        ef  = SIZE - l - t;
        cap = (l >= SIZE - RSV) ? 0 : SIZE - RSV - l;
        er  = (cap < ef) ? cap : ef;
        chk(int'(free) === ef, $sformatf("free l=%0d t=%0d", l, t));
        chk(int'(lt_room) === er, $sformatf("lt_room l=%0d t=%0d got %0d exp %0d", l, t, lt_room, er));
        if (t === 0 && l <= SIZE - RSV) chk(l + int'(lt_room) <= SIZE - RSV, "LT can never take the reserve");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
