// End-to-end testbench of the GRAND decoder at its default parameters.
//
// Bank 0 holds a rate-0.656 code (44 parity rows), bank 1 a rate-0.8 code
// (26 rows). Phase 1 streams error-free code-words and checks one result per
// cycle. Phase 2 streams channel outputs of both banks with errors of weight
// 0..4 under random input gaps and output back-pressure, and checks each
// result (matched by id) against the software search. Half-way, bank 1 is
// rewritten with a new code while bank-0 traffic continues. Every mechanism
// of the design is counted and must occur: direct code-word output, weight
// 1/2/3 decodes, failures, primary and secondary searching at once, results
// leaving out of order, both banks, a write waiting for its bank to drain,
// decoding during a write, a full primary FIFO, input and output stalls.
module tb_grand_decoder_top;
  import grand_pkg::*;
  import grand_tb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, in_tag, out_valid, out_ready, hw_valid, hw_ready;
  cw_t in_y;
  logic [ID_W-1:0] in_id;
  result_t out_res;
  h_write_t hw_req;
  logic [NBANKS-1:0] bank_busy;
  logic primary_busy, secondary_busy;

  grand_decoder_top dut (.*);

  localparam int TOTAL = 300;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- expected results by id ----------------
  result_t exp_q [int];
  int      order_q [$];        // ids in acceptance order
  int      received = 0, sent = 0;
  int      n_status [5];
  int      n_out_of_order = 0, n_overlap = 0, n_in_stall = 0, n_out_stall = 0;
  int      n_pq_full = 0, n_write_wait = 0, n_during_write = 0, n_bank[2];
  bit      stall_out = 1;
  int      cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic result_t expect_of(int bank, cw_t y, int id);
    result_t r;
    syn_t s = syndrome(bank, y);
    cw_t  e;
    int   w;
    r = '0;
    r.id = ID_W'(id); r.tag = 1'(bank); r.codeword = y;
    if (s == '0) r.status = DEC_HW0;
    else if (ref_search(bank, s, 1, 3, e, w)) begin
      r.status = dec_status_e'(w); r.error = e; r.codeword = y ^ e;
    end else r.status = DEC_FAIL;
    return r;
  endfunction

  always @(negedge clk) if (rst_n) out_ready <= stall_out ? ($urandom % 4 != 0) : 1'b1;

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      automatic int id = int'(out_res.id);
      if (!exp_q.exists(id)) begin
        check(0, $sformatf("unexpected result id %0d", id));
      end else begin
        automatic result_t x = exp_q[id];
        check(out_res == x, $sformatf("result of id %0d: status %0d exp %0d", id, out_res.status, x.status));
        n_status[int'(x.status)]++;
        exp_q.delete(id);
        if (order_q[0] != id) n_out_of_order++;
        foreach (order_q[i]) if (order_q[i] == id) begin order_q.delete(i); break; end
      end
      received++;
    end
    if (out_valid && !out_ready) n_out_stall++;
    if (in_valid && !in_ready) n_in_stall++;
    if (primary_busy && secondary_busy) n_overlap++;
    if (!dut.u_pq.in_ready) n_pq_full++;
    if (hw_valid && !hw_ready) n_write_wait++;
  end

  // ---------------- host writes of H ----------------
  bit rewriting = 0;
  task automatic write_bank(int b);
    for (int c = 0; c < N; c += 2) begin
      @(negedge clk);
      hw_valid = 1; hw_req = hw_word(b, c, c + 1, 1);
      @(posedge clk);
      while (!hw_ready) @(posedge clk);
    end
    @(negedge clk);
    hw_valid = 0; hw_req = '0;
  endtask

  // ---------------- one channel output ----------------
  task automatic send(int bank, int w, int id);
    cw_t c = encode(bank, rand_vec());
    cw_t y = c ^ rand_error(w);
    check(!exp_q.exists(id), "id not in flight twice");
    exp_q[id] = expect_of(bank, y, id);
    @(negedge clk);
    in_valid = 1; in_y = y; in_tag = 1'(bank); in_id = ID_W'(id);
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    order_q.push_back(id);
    n_bank[bank]++;
    if (rewriting) n_during_write++;
    sent++;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    for (int i = 0; i < 5; i++) n_status[i] = 0;
    n_bank[0] = 0; n_bank[1] = 0;
    rst_n = 0; in_valid = 0; in_y = '0; in_tag = 0; in_id = '0; hw_valid = 0; hw_req = '0;
    make_h(0, 44);
    make_h(1, 26);
    repeat (2) @(posedge clk);
    rst_n = 1;
    write_bank(0);
    write_bank(1);

    // ---- phase 1: error-free code-words, one per cycle ----
    stall_out = 0;
    begin
      automatic int r0 = received, t0;
      @(negedge clk);
      t0 = cycle;
      for (int i = 0; i < 64; i++) begin
        automatic int b = i % 2;
        exp_q[i] = expect_of(b, encode(b, rand_vec()), i);
        in_valid = 1; in_y = exp_q[i].codeword; in_tag = 1'(b); in_id = ID_W'(i);
        order_q.push_back(i);
        @(negedge clk);
        check(in_ready, "code-word accepted every cycle");
      end
      in_valid = 0;
      repeat (2) @(negedge clk);
      check(received == r0 + 64, "64 code-words out");
      check(cycle - t0 == 66, "64 code-words in 66 cycles (one per cycle, 2 cycles latency)");
    end
    stall_out = 1;

    // ---- phase 2: mixed traffic ----
    fork
      begin
        for (int i = 0; i < TOTAL; i++) begin
          automatic int r = int'($urandom % 100);
          automatic int w = (r < 30) ? 0 : (r < 55) ? 1 : (r < 80) ? 2 : (r < 95) ? 3 : 4;
          automatic int bank = rewriting ? 0 : int'($urandom % 2);
          if (i == TOTAL / 2) begin
            // new code-book for bank 1 while bank 0 keeps decoding
            rewriting = 1;
            fork
              begin
                make_h(1, 26);
                write_bank(1);
                rewriting = 0;
              end
            join_none
            bank = 0;
          end
          if ($urandom % 3 == 0) repeat ($urandom % 4) @(negedge clk);
          send(bank, w, (100 + i) % 256);   // ids wrap at 8 bits
        end
      end
    join
    wait (rewriting == 0);
    while (received < 64 + TOTAL) @(negedge clk);
    repeat (10) @(negedge clk);
    check(exp_q.size() == 0, "every channel output answered");
    check(received == 64 + TOTAL, "no extra results");
    $display("status counts: hw0 %0d hw1 %0d hw2 %0d hw3 %0d fail %0d", n_status[0], n_status[1],
             n_status[2], n_status[3], n_status[4]);
    $display("mechanisms: out-of-order %0d, primary+secondary busy cycles %0d, bank0 %0d bank1 %0d,",
             n_out_of_order, n_overlap, n_bank[0], n_bank[1]);
    $display("  write waited %0d, sent during write %0d, primary FIFO full %0d, input stalls %0d, output stalls %0d",
             n_write_wait, n_during_write, n_pq_full, n_in_stall, n_out_stall);
    check(n_status[0] > 0, "direct code-word output");
    check(n_status[1] > 0, "weight-1 decode (primary)");
    check(n_status[2] > 0, "weight-2 decode (primary)");
    check(n_status[3] > 0, "weight-3 decode (secondary)");
    check(n_status[4] > 0, "failure reported");
    check(n_overlap > 0, "primary and secondary searching at once");
    check(n_out_of_order > 0, "results out of order");
    check(n_bank[0] > 0 && n_bank[1] > 0, "both H banks used");
    check(n_write_wait > 0, "write waited for its bank to drain");
    check(n_during_write > 0, "decoding continued during a bank rewrite");
    check(n_pq_full > 0, "primary FIFO full");
    check(n_in_stall > 0, "input back-pressure");
    check(n_out_stall > 0, "output back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
