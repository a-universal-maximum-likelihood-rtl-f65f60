// Small synchronous FIFO with valid/ready on both sides.
//
// Holds the channel outputs waiting for a search block, so the stage in front
// can keep accepting channel outputs while a long search runs. Storage is a
// register array of DEPTH entries of type T with read and write pointers one
// bit wider than the index (full when they differ only in that bit).
// Data on the output is valid in the cycle `out_valid` is high; a push and a
// pop may happen in the same cycle.
// The queues are this design's addition: the published architecture only says
// that channel outputs wait while a block is busy.
module sync_fifo #(
  parameter type         T     = grand_pkg::job_t,
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  T            mem [DEPTH];
  logic [AW:0] wr_ptr, rd_ptr;

  assign out_valid = (wr_ptr != rd_ptr);
  assign in_ready  = !((wr_ptr[AW] != rd_ptr[AW]) && (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]));
  assign out_data  = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wr_ptr[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (in_valid && in_ready)   wr_ptr <= wr_ptr + 1'b1;
      if (out_valid && out_ready) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0);

endmodule
