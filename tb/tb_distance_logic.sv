// Self-checking testbench of distance_logic: walks weights 1..3 and 3..3 with
// overflows raised after a random number of cycles per seed, and checks the
// (D1,D2) sequence, the number of seeds, finish and stop.
module tb_distance_logic;
  import grand_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  logic start_a, stop_a, active_a, advance_a, finish_a;
  logic start_b, stop_b, active_b, advance_b, finish_b;
  logic [15:0] ovf_a, ovf_b;
  idx_t d1_a, d2_a, d1_b, d2_b;

  distance_logic #(.MIN_HW(1), .MAX_HW(3)) dut_a (.clk, .rst_n, .start(start_a), .stop(stop_a),
    .overflow(ovf_a), .active(active_a), .advance(advance_a), .finish(finish_a), .d1(d1_a), .d2(d2_a));
  distance_logic #(.MIN_HW(3), .MAX_HW(3)) dut_b (.clk, .rst_n, .start(start_b), .stop(stop_b),
    .overflow(ovf_b), .active(active_b), .advance(advance_b), .finish(finish_b), .d1(d1_b), .d2(d2_b));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected seed list, weights lo..hi
  function automatic void seeds(int lo, int hi, ref int q1[$], ref int q2[$]);
    if (lo <= 1) begin q1.push_back(0); q2.push_back(0); end
    if (lo <= 2 && hi >= 2) for (int a = 1; a < N; a++) begin q1.push_back(a); q2.push_back(0); end
    if (hi >= 3) for (int b = 1; b < N - 1; b++) for (int a = 1; a + b < N; a++) begin
      q1.push_back(a); q2.push_back(b);
    end
  endfunction

  initial begin
    int q1[$], q2[$];
    int n, fin;
    rst_n = 0; start_a = 0; stop_a = 0; ovf_a = 0; start_b = 0; stop_b = 0; ovf_b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- weights 1..3 ----
    seeds(1, 3, q1, q2);
    @(negedge clk) start_a = 1;
    @(negedge clk) start_a = 0;
    n = 0; fin = 0;
    while (active_a) begin
      automatic int wait_c = int'($urandom_range(2, 0));
      check(int'(d1_a) == q1[n] && int'(d2_a) == q2[n], $sformatf("seed %0d", n));
      repeat (wait_c) begin
        @(negedge clk);
        check(int'(d1_a) == q1[n] && int'(d2_a) == q2[n], "seed held without overflow");
      end
      ovf_a = 16'(1) << ($urandom % 16);
      #1;
      check(advance_a, "advance on overflow");
      if (finish_a) fin++;
      @(negedge clk) ovf_a = 0;
      n++;
    end
    check(n == q1.size(), $sformatf("seed count %0d of %0d", n, q1.size()));
    check(n == 1 + 127 + 8001, "seed count 8129");
    check(fin == 1, "one finish");
    // ---- weight 3 only, stopped part-way ----
    q1.delete(); q2.delete();
    seeds(3, 3, q1, q2);
    @(negedge clk) start_b = 1;
    @(negedge clk) start_b = 0;
    for (int i = 0; i < 300; i++) begin
      check(active_b && int'(d1_b) == q1[i] && int'(d2_b) == q2[i], "weight-3 seed");
      ovf_b = 16'h8000; @(negedge clk); ovf_b = 0;
    end
    stop_b = 1; @(negedge clk); stop_b = 0;
    check(!active_b, "stop");
    ovf_b = 16'hffff; #1;
    check(!advance_b, "no advance when idle");
    @(negedge clk) ovf_b = 0; start_b = 1;
    @(negedge clk) start_b = 0;
    check(active_b && d1_b == 1 && d2_b == 1, "restart at (1,1)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
