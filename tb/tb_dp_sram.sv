// Self-checking testbench of dp_sram: random reads and writes on both ports
// against an array model, one-cycle read latency, output held while disabled.
module tb_dp_sram;
  localparam int W = 44, D = 128;
  logic clk = 0;
  always #5 clk = ~clk;

  logic en_a, we_a, en_b, we_b;
  logic [6:0] addr_a, addr_b;
  logic [W-1:0] wdata_a, wdata_b, rdata_a, rdata_b;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  dp_sram #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    en_a = 0; en_b = 0; we_a = 0; we_b = 0; addr_a = 0; addr_b = 0; wdata_a = 0; wdata_b = 0;
    // fill through both ports, two words per cycle
    for (int i = 0; i < D; i += 2) begin
      @(negedge clk);
      en_a = 1; we_a = 1; addr_a = 7'(i);     wdata_a = W'({$urandom, $urandom}); model[i]   = wdata_a;
      en_b = 1; we_b = 1; addr_b = 7'(i + 1); wdata_b = W'({$urandom, $urandom}); model[i+1] = wdata_b;
    end
    // random traffic
    for (int t = 0; t < 3000; t++) begin
      logic [W-1:0] exp_a, exp_b;
      logic ra, rb;
      @(negedge clk);
      en_a = 1'($urandom); we_a = ($urandom % 4) == 0; addr_a = 7'($urandom);
      en_b = 1'($urandom); we_b = ($urandom % 4) == 0; addr_b = 7'($urandom);
      if (addr_a == addr_b) we_b = 0;
      wdata_a = W'({$urandom, $urandom}); wdata_b = W'({$urandom, $urandom});
      ra = en_a && !we_a; rb = en_b && !we_b;
      exp_a = model[addr_a]; exp_b = model[addr_b];
      // a read and a write of the same word in one cycle: read data undefined here
      if (ra && en_b && we_b && addr_b == addr_a) ra = 0;
      if (rb && en_a && we_a && addr_a == addr_b) rb = 0;
      @(posedge clk);
      if (en_a && we_a) model[addr_a] = wdata_a;
      if (en_b && we_b) model[addr_b] = wdata_b;
      #1;
      if (ra) check("port A read", rdata_a, exp_a);
      if (rb) check("port B read", rdata_b, exp_b);
      // disabled ports keep their output for one more cycle
      if (ra || rb) begin
        logic [W-1:0] ha, hb;
        ha = rdata_a; hb = rdata_b;
        @(negedge clk); en_a = 0; en_b = 0;
        @(posedge clk); #1;
        if (ra) check("port A hold", rdata_a, ha);
        if (rb) check("port B hold", rdata_b, hb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
