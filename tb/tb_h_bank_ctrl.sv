// Self-checking testbench of h_bank_ctrl: in-flight counting per bank,
// holding off inputs to a bank with a pending write, granting the write only
// when the bank is empty, and leaving the other bank untouched.
module tb_h_bank_ctrl;
  import grand_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  logic wr_valid, wr_ready, in_fire, in_tag, out_fire, out_tag;
  h_write_t wr_req, h_wr;
  logic [1:0] in_block, bank_busy;

  h_bank_ctrl dut (.*);

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

  int model [2];

  initial begin
    rst_n = 0; wr_valid = 0; wr_req = '0; in_fire = 0; in_tag = 0; out_fire = 0; out_tag = 0;
    model[0] = 0; model[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      // random traffic, never retiring more than is inside
      wr_valid    = ($urandom % 8) == 0;
      wr_req      = '0;
      wr_req.bank = 1'($urandom);
      wr_req.en   = 2'($urandom % 3 + 1);
      wr_req.addr = {7'($urandom), 7'($urandom)};
      wr_req.data = {44'($urandom), 44'($urandom)};
      in_tag      = 1'($urandom);
      in_fire     = ($urandom % 2 == 1) && !(wr_valid && wr_req.bank == in_tag);
      out_tag     = 1'($urandom);
      out_fire    = ($urandom % 2 == 1) && model[out_tag] > 0;
      #1;
      check(bank_busy[0] == (model[0] > 0) && bank_busy[1] == (model[1] > 0), "busy flags");
      check(in_block[0] == (wr_valid && wr_req.bank == 0) &&
            in_block[1] == (wr_valid && wr_req.bank == 1), "input block");
      check(wr_ready == (model[wr_req.bank] == 0), "write granted only to an empty bank");
      if (wr_valid && wr_ready)
        check(h_wr.en == wr_req.en && h_wr.bank == wr_req.bank && h_wr.addr == wr_req.addr
              && h_wr.data == wr_req.data, "write passed on");
      else
        check(h_wr.en == 2'b00, "no write when not granted");
      if (in_fire)  model[in_tag]++;
      if (out_fire) model[out_tag]--;
    end
    // drain bank 1 with a pending write: the write waits, then goes
    @(negedge clk);
    in_fire = 0; out_fire = 0;
    repeat (3) begin
      @(negedge clk); in_fire = 1; in_tag = 1; model[1]++;
    end
    @(negedge clk); in_fire = 0;
    wr_valid = 1; wr_req.bank = 1; wr_req.en = 2'b11;
    while (model[1] > 0) begin
      #1 check(!wr_ready && in_block[1] && !in_block[0], "write waits for bank 1");
      @(negedge clk); out_fire = 1; out_tag = 1; model[1]--;
    end
    @(negedge clk); out_fire = 0;
    #1 check(wr_ready && h_wr.en == 2'b11, "write granted after drain");
    @(negedge clk); wr_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
