// Workload testbench: the decoder at its default parameters on a binary
// symmetric channel with bit-flip probability 1e-3 and a rate-0.8 code
// (n = 128, k = 102, 26 parity rows), the operating point the decoder is
// sized for.
//
// Random code-words pass through the channel (each bit flipped independently
// with probability 1/1000) and are offered back to back, with the output
// always ready. Every result is checked against the software search. The
// testbench reports the error-weight mix seen and the decoded payload per
// clock cycle, which must reach 5 bits/cycle (250 Mbit/s at 50 MHz); the
// weight-0 fraction must be near the expected 88%.
module tb_bsc_workload;
  import grand_pkg::*;
  import grand_tb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  localparam int WORDS = 20000;
  localparam int ROWS  = 26;            // rate 102/128 = 0.8
  localparam int K     = N - ROWS;

  logic in_valid, in_ready, in_tag, out_valid, out_ready, hw_valid, hw_ready;
  cw_t in_y;
  logic [ID_W-1:0] in_id;
  result_t out_res;
  h_write_t hw_req;
  logic [NBANKS-1:0] bank_busy;
  logic primary_busy, secondary_busy;

  grand_decoder_top dut (.*);

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

  result_t exp_q [int];
  int      received = 0, cycle = 0, t_first = -1, t_last = 0;
  int      n_status [5];
  int      n_true_w [6];
  int      next_id = 0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    automatic int id = int'(out_res.id);
    check(exp_q.exists(id) && out_res == exp_q[id], $sformatf("result of id %0d", id));
    if (exp_q.exists(id)) begin
      n_status[int'(exp_q[id].status)]++;
      exp_q.delete(id);
    end
    received++;
    t_last = cycle;
  end

  function automatic cw_t bsc_noise();
    cw_t e = '0;
    for (int i = 0; i < N; i++) e[i] = ($urandom % 1000) == 0;
    return e;
  endfunction

  initial begin
    for (int i = 0; i < 5; i++) n_status[i] = 0;
    for (int i = 0; i < 6; i++) n_true_w[i] = 0;
    rst_n = 0; in_valid = 0; in_y = '0; in_tag = 0; in_id = '0; hw_valid = 0; hw_req = '0;
    out_ready = 1;
    make_h(0, ROWS);
    make_h(1, ROWS);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NBANKS; b++)
      for (int c = 0; c < N; c += 2) begin
        @(negedge clk);
        hw_valid = 1; hw_req = hw_word(b, c, c + 1, 1);
        @(posedge clk);
        while (!hw_ready) @(posedge clk);
      end
    @(negedge clk);
    hw_valid = 0; hw_req = '0;
    for (int i = 0; i < WORDS; i++) begin
      automatic int   bank = int'($urandom % 2);
      automatic cw_t  e    = bsc_noise();
      automatic cw_t  y    = encode(bank, rand_vec()) ^ e;
      automatic syn_t s    = syndrome(bank, y);
      automatic result_t r = '0;
      automatic cw_t  re;
      automatic int   rw;
      automatic int   id;
      // next id not still inside the decoder (results leave out of order)
      while (exp_q.exists(next_id)) next_id = (next_id + 1) % 256;
      id = next_id;
      next_id = (next_id + 1) % 256;
      n_true_w[($countones(e) > 5) ? 5 : $countones(e)]++;
      r.id = ID_W'(id); r.tag = 1'(bank); r.codeword = y;
      if (s == '0) r.status = DEC_HW0;
      else if (ref_search(bank, s, 1, 3, re, rw)) begin
        r.status = dec_status_e'(rw); r.error = re; r.codeword = y ^ re;
      end else r.status = DEC_FAIL;
      check(!exp_q.exists(id), "id not in flight twice");
      exp_q[id] = r;
      in_valid = 1; in_y = y; in_tag = 1'(bank); in_id = ID_W'(id);
      @(posedge clk);
      if (t_first < 0) t_first = cycle;
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
    end
    while (received < WORDS) @(negedge clk);
    begin
      automatic real bits_per_cycle = real'(WORDS) * K / real'(t_last - t_first + 1);
      automatic real hw0_frac       = real'(n_status[0]) / WORDS;
      $display("channel error weights 0..5+: %0d %0d %0d %0d %0d %0d", n_true_w[0], n_true_w[1],
               n_true_w[2], n_true_w[3], n_true_w[4], n_true_w[5]);
      $display("decoder status hw0 %0d hw1 %0d hw2 %0d hw3 %0d fail %0d", n_status[0], n_status[1],
               n_status[2], n_status[3], n_status[4]);
      $display("%0d code-words in %0d cycles: %.2f decoded bits/cycle (%.0f Mbit/s at 50 MHz)",
               WORDS, t_last - t_first + 1, bits_per_cycle, bits_per_cycle * 50.0);
      check(received == WORDS && exp_q.size() == 0, "every code-word answered");
      check(bits_per_cycle >= 5.0, "at least 5 decoded bits per cycle (250 Mbit/s at 50 MHz)");
      check(hw0_frac > 0.85 && hw0_frac < 0.91, "weight-0 fraction near 0.88");
      check(n_status[1] > 0 && n_status[2] > 0 && n_status[3] > 0, "weight-1, 2 and 3 errors decoded");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
