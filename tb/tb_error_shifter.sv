// Self-checking testbench of error_shifter: for random seeds of weight 1..3,
// every shift 0..127-top must appear exactly once, in order, with the
// overflow flag only on the lane whose top bit reaches 127, and the seed must
// take ceil((128-top)/16) cycles.
module tb_error_shifter;
  import grand_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, run, advance;
  sparse_err_t seed;
  idx_t top;
  logic [15:0] lane_valid, overflow;
  sparse_err_t [15:0] lane_err;
  int checks = 0, failures = 0;

  error_shifter #(.LANES(16), .BRANCHES(4)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  assign advance = |overflow;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; run = 0; seed = '0; top = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 400; t++) begin
      int w, a, b, tp, next_s, cyc;
      w = 1 + int'($urandom % 3);
      if (t < 3) w = t + 1;
      a = (w >= 2) ? 1 + int'($urandom % 127) : 0;
      b = (w == 3 && a < 127) ? 1 + int'($urandom % (127 - a)) : 0;
      if (w == 3 && b == 0) w = 2;
      if (t == 0) a = 0;
      tp = a + b;
      run = 1;
      seed.hw = 2'(w); seed.pos[0] = 0; seed.pos[1] = idx_t'(a); seed.pos[2] = idx_t'(a + b);
      top = idx_t'(tp);
      next_s = 0; cyc = 0;
      do begin
        #1;
        cyc++;
        for (int l = 0; l < 16; l++) begin
          if (lane_valid[l]) begin
            check(next_s <= N - 1 - tp, "shift beyond 127");
            check(int'(lane_err[l].pos[0]) == next_s && lane_err[l].hw == 2'(w), "lane position 0");
            if (w >= 2) check(int'(lane_err[l].pos[1]) == next_s + a, "lane position 1");
            if (w >= 3) check(int'(lane_err[l].pos[2]) == next_s + a + b, "lane position 2");
            check(overflow[l] == (next_s + tp == N - 1), "overflow flag");
            next_s++;
          end else begin
            check(!overflow[l], "overflow on invalid lane");
          end
        end
        @(negedge clk);
      end while (!(next_s == N - tp) && cyc < 20);
      check(next_s == N - tp, $sformatf("all shifts of seed top=%0d", tp));
      check(cyc == (N - tp + 15) / 16, "cycles per seed");
      // alternate: sometimes drop run between seeds
      if ($urandom % 2 == 1) begin run = 0; @(negedge clk); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
