// Syndrome calculator: the first stage of the decoder.
//
// For each channel output y it forms s = H * y over GF(2) with the H bank that
// the output's tag selects. Multiplication over GF(2) is an AND and addition an
// XOR, so s is the XOR of the columns of H at the positions where y has a one.
// All 128 columns are combined in one cycle; s is zero exactly when y is a
// code-word of the selected code. The zero flag goes with the result so the
// next stage can send such a code-word straight to the output.
//
// This block keeps its own register copy of both H banks, because a dense y
// needs every column at once; the dual-port SRAMs of the search blocks only
// deliver a few columns per cycle. Columns are written through the shared H
// write bus (up to two per cycle), in the same cycle as the search blocks'
// SRAMs.
//
// Interface: valid/ready on both sides, a one-entry pipeline register.
// Latency one cycle; one channel output per cycle when the output is ready.
// The published architecture gives only this stage's function; the register
// copy and the single-cycle XOR tree are this design's choice.
module syndrome_calc
  import grand_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // H column writes
  input  h_write_t h_wr,
  // channel output in
  input  logic     in_valid,
  output logic     in_ready,
  input  job_t     in_job,      // syn field ignored
  // channel output with its syndrome
  output logic     out_valid,
  input  logic     out_ready,
  output job_t     out_job,
  output logic     out_zero     // syndrome is zero: y is a code-word
);

  syn_t h_cols [NBANKS][N];

  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++)
      if (h_wr.en[p]) h_cols[h_wr.bank][h_wr.addr[p]] <= h_wr.data[p];
  end

  // H * y: XOR of the columns selected by the ones of y
  syn_t syn;
  always_comb begin
    syn = '0;
    for (int i = 0; i < N; i++)
      if (in_job.y[i]) syn ^= h_cols[in_job.tag][i];
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_job   <= '0;
      out_zero  <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_job     <= in_job;
        out_job.syn <= syn;
        out_zero    <= (syn == '0);
      end
    end
  end

endmodule
