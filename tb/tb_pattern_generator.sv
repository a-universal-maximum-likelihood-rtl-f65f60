// Self-checking testbench of pattern_generator: every distance pair of
// weights 1..3 against the seed built bit by bit.
module tb_pattern_generator;
  import grand_pkg::*;
  idx_t d1, d2, top;
  sparse_err_t seed;
  cw_t seed_vec;
  int checks = 0, failures = 0;

  pattern_generator dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s d1=%0d d2=%0d", what, d1, d2);
    end
  endtask

  initial begin
    for (int a = 0; a < N; a++)
      for (int b = 0; a + b < N; b++) begin
        cw_t exp;
        int  w, t;
        if (a == 0 && b != 0) continue;
        d1 = idx_t'(a); d2 = idx_t'(b);
        #1;
        exp = '0; exp[0] = 1'b1;
        if (a != 0) exp[a] = 1'b1;
        if (b != 0) exp[a + b] = 1'b1;
        w = (a == 0) ? 1 : (b == 0) ? 2 : 3;
        t = (a == 0) ? 0 : a + b;
        check(seed_vec == exp, "seed vector");
        check(int'(seed.hw) == w, "weight");
        check(int'(top) == t, "top");
        check(seed.pos[0] == 0 && (w < 2 || int'(seed.pos[1]) == a)
              && (w < 3 || int'(seed.pos[2]) == a + b), "positions");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
