// Self-checking testbench of error_generator: the weight-1..2 instance and the
// weight-3 instance must each issue every error vector of their weights exactly
// once, in the documented order, taking 8 + 568 and 25256 cycles; a stop
// ends a walk at once.
module tb_error_generator;
  import grand_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  logic start_p, stop_p, active_p, finish_p;
  logic start_s, stop_s, active_s, finish_s;
  logic [15:0] valid_p, valid_s;
  sparse_err_t [15:0] err_p, err_s;

  error_generator #(.MIN_HW(1), .MAX_HW(2)) dut_p (.clk, .rst_n, .start(start_p), .stop(stop_p),
    .active(active_p), .finish(finish_p), .lane_valid(valid_p), .lane_err(err_p));
  error_generator #(.MIN_HW(3), .MAX_HW(3)) dut_s (.clk, .rst_n, .start(start_s), .stop(stop_s),
    .active(active_s), .finish(finish_s), .lane_valid(valid_s), .lane_err(err_s));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference order as (w, p0, p1, p2), advanced one vector at a time
  int rw, rp, rd1, rd2;
  function automatic void ref_first(int w);
    rw = w; rp = 0; rd1 = (w >= 2) ? 1 : 0; rd2 = (w == 3) ? 1 : 0;
  endfunction
  // returns 0 after the last vector of weight max_w
  function automatic bit ref_next(int max_w);
    rp++;
    if (rp + rd1 + rd2 < N) return 1;
    rp = 0;
    if (rw == 1) begin
      if (max_w == 1) return 0;
      ref_first(2); return 1;
    end
    if (rw == 2) begin
      if (rd1 < N - 1) begin rd1++; return 1; end
      if (max_w == 2) return 0;
      ref_first(3); return 1;
    end
    if (rd1 + rd2 < N - 1) begin rd1++; return 1; end
    if (rd2 < N - 2) begin rd2++; rd1 = 1; return 1; end
    return 0;
  endfunction

  task automatic walk(bit prim, int min_w, int max_w, int exp_cycles, int exp_count);
    int cyc = 0, count = 0, fin = 0;
    bit more = 1, order_ok = 1;
    ref_first(min_w);
    @(negedge clk);
    if (prim) start_p = 1; else start_s = 1;
    @(negedge clk);
    start_p = 0; start_s = 0;
    while (prim ? active_p : active_s) begin
      logic [15:0] v;
      sparse_err_t [15:0] e;
      v = prim ? valid_p : valid_s;
      e = prim ? err_p : err_s;
      cyc++;
      if (prim ? finish_p : finish_s) fin++;
      for (int l = 0; l < 16; l++)
        if (v[l]) begin
          bit ok;
          ok = more && int'(e[l].hw) == rw && int'(e[l].pos[0]) == rp
               && (rw < 2 || int'(e[l].pos[1]) == rp + rd1)
               && (rw < 3 || int'(e[l].pos[2]) == rp + rd1 + rd2);
          if (!ok && order_ok) begin
            order_ok = 0;
            $display("first order mismatch at vector %0d (lane %0d)", count, l);
          end
          count++;
          more = ref_next(max_w);
        end
      @(negedge clk);
    end
    check(order_ok, "vectors in documented order");
    check(!more, "walk reached the last vector");
    check(count == exp_count, $sformatf("vector count %0d exp %0d", count, exp_count));
    check(cyc == exp_cycles, $sformatf("cycles %0d exp %0d", cyc, exp_cycles));
    check(fin == 1, "one finish");
  endtask

  initial begin
    rst_n = 0; start_p = 0; stop_p = 0; start_s = 0; stop_s = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    walk(1, 1, 2, 8 + 568, 128 + 8128);
    walk(0, 3, 3, 25256, 341376);
    // stop part-way
    @(negedge clk) start_p = 1;
    @(negedge clk) start_p = 0;
    repeat (20) @(negedge clk);
    check(active_p, "running before stop");
    stop_p = 1;
    @(negedge clk) stop_p = 0;
    check(!active_p && valid_p == '0, "stopped");
    // walk again after the stop: starts from the first vector
    walk(1, 1, 2, 8 + 568, 128 + 8128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
