// Self-checking testbench of sparse_mvm: both variants (two and three error
// bits) against H*e computed in software, for both H banks, with the
// one-cycle latency checked.
module tb_sparse_mvm;
  import grand_pkg::*;
  import grand_tb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  h_write_t    h_wr;
  logic        rd_en, rd_bank;
  sparse_err_t err;
  logic        v2, v3;
  syn_t        p2, p3;

  sparse_mvm #(.MAX_HW(2)) dut2 (.clk, .rst_n, .h_wr, .rd_en, .rd_bank, .err,
                                 .out_valid(v2), .product(p2));
  sparse_mvm #(.MAX_HW(3)) dut3 (.clk, .rst_n, .h_wr, .rd_en, .rd_bank, .err,
                                 .out_valid(v3), .product(p3));

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

  initial begin
    rst_n = 0; h_wr = '0; rd_en = 0; rd_bank = 0; err = '0;
    make_h(0, 44);
    make_h(1, 30);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NBANKS; b++)
      for (int c = 0; c < N; c += 2) begin
        @(negedge clk) h_wr = hw_word(b, c, c + 1, 1);
      end
    @(negedge clk) h_wr = '0;
    for (int t = 0; t < 4000; t++) begin
      int w, bank;
      cw_t e;
      syn_t exp;
      w    = 1 + int'($urandom % 3);
      bank = int'($urandom % 2);
      e    = rand_error(w);
      @(negedge clk);
      rd_en   = 1;
      rd_bank = 1'(bank);
      err     = '0;
      err.hw  = 2'(w);
      begin
        automatic int k = 0;
        for (int i = 0; i < N; i++) if (e[i]) begin err.pos[k] = idx_t'(i); k++; end
      end
      exp = syndrome(bank, e);
      @(negedge clk);
      rd_en = 0;
      err   = '0;
      check(v3 && p3 == exp, $sformatf("weight-%0d product, 3-column multiplier", w));
      if (w <= 2) check(v2 && p2 == exp, $sformatf("weight-%0d product, 2-column multiplier", w));
      @(negedge clk);
      check(!v2 && !v3, "valid only for one cycle");
    end
    // rewrite one column of bank 1 and read it back
    hmat[1][5] = ~hmat[1][5];
    @(negedge clk) h_wr = hw_word(1, 5, 5, 0);
    @(negedge clk) begin
      h_wr = '0; rd_en = 1; rd_bank = 1; err = '0; err.hw = 1; err.pos[0] = 5;
    end
    @(negedge clk) rd_en = 0;
    check(p2 == hmat[1][5] && p3 == hmat[1][5], "rewritten column");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
