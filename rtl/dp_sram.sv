// Dual-port SRAM holding the columns of one parity-check matrix.
//
// Two independent synchronous ports, each able to read or write one word per
// cycle. A word is one column of H (M bits), addressed by its column number.
// Read data appears on the cycle after the port is enabled and holds while the
// port is disabled, like a compiled SRAM macro; a disabled port draws no read
// and does not change its output. A write returns no read data (the output
// keeps its value). Writing the same address from both ports in one cycle is
// not allowed (port B would win here); an assertion flags it.
// The decoder uses such SRAMs so the same column of H can be fetched for two
// error bits in one cycle; the array here stands for the macro.
// The dual-port organisation comes from the published architecture; the
// read timing and the hold behaviour are this model's choice.
module dp_sram #(
  parameter int unsigned WIDTH = grand_pkg::M,
  parameter int unsigned DEPTH = grand_pkg::N
) (
  input  logic                     clk,
  // port A
  input  logic                     en_a,
  input  logic                     we_a,
  input  logic [$clog2(DEPTH)-1:0] addr_a,
  input  logic [WIDTH-1:0]         wdata_a,
  output logic [WIDTH-1:0]         rdata_a,
  // port B
  input  logic                     en_b,
  input  logic                     we_b,
  input  logic [$clog2(DEPTH)-1:0] addr_b,
  input  logic [WIDTH-1:0]         wdata_b,
  output logic [WIDTH-1:0]         rdata_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en_a) begin
      if (we_a) mem[addr_a] <= wdata_a;
      else      rdata_a     <= mem[addr_a];
    end
    if (en_b) begin
      if (we_b) mem[addr_b] <= wdata_b;
      else      rdata_b     <= mem[addr_b];
    end
  end

  a_no_double_write: assert property (@(posedge clk)
    !(en_a && we_a && en_b && we_b && addr_a == addr_b));

endmodule
