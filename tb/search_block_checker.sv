// Shared checking harness for the primary and secondary noise search blocks.
//
// Builds random systematic codes for both H banks, writes them through the H
// write bus, and sends channel outputs y = c xor e with errors of the weights
// in WEIGHTS (one per test, chosen at random). For each, the software search
// (same order as the hardware) says whether the block must decode y, and to
// which error, or forward it. Checked: result fields, forwarded job, the
// latency (issue cycle of the winning vector + 3, or all generator cycles + 2
// for a forward), holding under random back-pressure, and a rewrite of bank 1
// between channel outputs.
module search_block_checker #(
  parameter int MIN_HW = 1,
  parameter int MAX_HW = 2,
  parameter int TESTS  = 200,
  parameter int W_LO   = 1,      // error weights tried: W_LO..W_HI
  parameter int W_HI   = 3
);
  import grand_pkg::*;
  import grand_tb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  h_write_t h_wr;
  logic in_valid, in_ready, res_valid, res_ready, fwd_valid, fwd_ready, busy, busy_bank;
  job_t in_job, fwd_job;
  result_t res;

  noise_search_block #(.MIN_HW(MIN_HW), .MAX_HW(MAX_HW)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_bank(int b);
    for (int c = 0; c < N; c += 2) begin
      @(negedge clk) h_wr = hw_word(b, c, c + 1, 1);
    end
    @(negedge clk) h_wr = '0;
  endtask

  int decoded = 0, forwarded = 0, stalled = 0;
  int by_w [4];

  initial begin
    rst_n = 0; h_wr = '0; in_valid = 0; in_job = '0; res_ready = 0; fwd_ready = 0;
    for (int i = 0; i < 4; i++) by_w[i] = 0;
    make_h(0, 44);
    make_h(1, 32);
    repeat (2) @(posedge clk);
    rst_n = 1;
    load_bank(0);
    load_bank(1);
    for (int t = 0; t < TESTS; t++) begin
      automatic int   bank = int'($urandom % 2);
      automatic int   w    = W_LO + int'($urandom % (W_HI - W_LO + 1));
      automatic cw_t  c    = encode(bank, rand_vec());
      automatic cw_t  e    = rand_error(w);
      automatic cw_t  y    = c ^ e;
      automatic syn_t s    = syndrome(bank, y);
      automatic cw_t  re;
      automatic int   rw, lat = 0, exp_lat;
      automatic bit   hit;
      automatic job_t j    = '0;
      if (t == TESTS / 2) begin
        // new code-book in bank 1 between channel outputs
        make_h(1, 40);
        load_bank(1);
        c = encode(bank, rand_vec()); y = c ^ e; s = syndrome(bank, y);
      end
      hit = ref_search(bank, s, MIN_HW, MAX_HW, re, rw);
      exp_lat = hit ? issue_cycle(re, rw, MIN_HW, 16) + 3 : gen_cycles(MIN_HW, MAX_HW, 16) + 2;
      j.id = ID_W'(t); j.tag = 1'(bank); j.y = y; j.syn = s;
      @(negedge clk);
      in_job = j; in_valid = 1;
      @(posedge clk);
      check(in_ready, "idle block takes a job");
      @(negedge clk);
      in_valid = 0; in_job = '0;
      check(busy && busy_bank == 1'(bank), "busy with the job's bank");
      lat = 1;
      while (!res_valid && !fwd_valid) begin @(negedge clk); lat++; end
      check(lat == exp_lat, $sformatf("latency %0d expected %0d (weight %0d hit %0d)", lat, exp_lat, rw, hit));
      // random back-pressure before taking the output
      if ($urandom % 3 == 0) begin
        repeat (1 + $urandom % 3) begin @(negedge clk); stalled++; end
      end
      if (hit) begin
        check(res_valid && !fwd_valid, "decoded, not forwarded");
        check(res.id == j.id && res.tag == j.tag, "result id and tag");
        check(res.error == re && res.codeword == (y ^ re), "error vector and code-word");
        check(int'(res.status) == rw, "status is the error weight");
        check(syndrome(bank, res.codeword) == '0, "output is a code-word");
        decoded++;
        by_w[rw]++;
        res_ready = 1;
      end else begin
        check(fwd_valid && !res_valid, "forwarded, not decoded");
        check(fwd_job == j, "forwarded job unchanged");
        forwarded++;
        fwd_ready = 1;
      end
      @(negedge clk);
      res_ready = 0; fwd_ready = 0;
      check(!res_valid && !fwd_valid && in_ready, "back to idle");
    end
    check(decoded > 0 && forwarded > 0, "both outcomes seen");
    check(stalled > 0, "back-pressure seen");
    for (int w = MIN_HW; w <= MAX_HW; w++)
      check(by_w[w] > 0, $sformatf("a weight-%0d decode seen", w));
    $display("decoded %0d (w1 %0d, w2 %0d, w3 %0d), forwarded %0d",
             decoded, by_w[1], by_w[2], by_w[3], forwarded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
