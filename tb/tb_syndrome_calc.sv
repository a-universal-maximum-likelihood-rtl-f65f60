// Self-checking testbench of syndrome_calc: random channel outputs and
// code-words of both H banks against H*y in software, the zero flag, one-cycle
// latency and throughput, and holding under back-pressure.
module tb_syndrome_calc;
  import grand_pkg::*;
  import grand_tb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  h_write_t h_wr;
  logic in_valid, in_ready, out_valid, out_ready, out_zero;
  job_t in_job, out_job;

  syndrome_calc dut (.*);

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

  job_t sent[$];
  int   nsent = 0, nrecv = 0, zeros = 0, stalls = 0;
  localparam int TOTAL = 3000;

  // consumer with random back-pressure
  always @(negedge clk) if (rst_n) out_ready <= ($urandom % 4) != 0;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    job_t e;
    syn_t s;
    e = sent.pop_front();
    s = syndrome(int'(e.tag), e.y);
    check(out_job.y == e.y && out_job.id == e.id && out_job.tag == e.tag, "job carried");
    check(out_job.syn == s, "syndrome");
    check(out_zero == (s == '0), "zero flag");
    if (s == '0) zeros++;
    nrecv++;
  end

  always @(posedge clk) if (rst_n && out_valid && !out_ready) stalls++;

  initial begin
    rst_n = 0; h_wr = '0; in_valid = 0; in_job = '0; out_ready = 0;
    make_h(0, 44);
    make_h(1, 26);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NBANKS; b++)
      for (int c = 0; c < N; c += 2) begin
        @(negedge clk) h_wr = hw_word(b, c, c + 1, 1);
      end
    @(negedge clk) h_wr = '0;
    while (nsent < TOTAL) begin
      job_t j;
      automatic int bank = int'($urandom % 2);
      j = '0;
      j.id  = ID_W'(nsent);
      j.tag = 1'(bank);
      j.y   = ($urandom % 2 == 1) ? encode(bank, rand_vec()) : rand_vec();
      in_job   = j;
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      sent.push_back(j);
      nsent++;
      @(negedge clk);
      in_valid = 0;
    end
    while (nrecv < TOTAL) @(negedge clk);
    check(zeros > TOTAL / 3, "code-words seen as code-words");
    check(stalls > 0, "back-pressure exercised");
    // throughput and latency: with the output always ready, one per cycle
    force out_ready = 1'b1;
    @(negedge clk);
    begin
      automatic int c0 = nrecv;
      for (int i = 0; i < 20; i++) begin
        automatic job_t j = '0;
        j.id = ID_W'(i); j.y = rand_vec(); j.tag = 1'(i % 2);
        in_job = j; in_valid = 1;
        sent.push_back(j);
        @(negedge clk);
        check(out_valid && out_job.y == j.y, "one-cycle latency");
      end
      in_valid = 0;
      @(negedge clk);
      check(nrecv == c0 + 20, "one channel output per cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
