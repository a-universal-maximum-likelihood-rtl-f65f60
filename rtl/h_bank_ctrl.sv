// H bank controller for the time-interleaved, re-randomised code-book.
//
// The decoder keeps two parity-check matrices, H0 and H1 (banks 0 and 1). Each
// channel output carries a tag that names the bank it was encoded for, so
// consecutive code-words can use different code-books. This block lets the
// host rewrite one bank while channel outputs of the other bank are decoded,
// with no pause in decoding:
//   - it counts, per bank, the channel outputs inside the decoder
//     (accepted at the input, not yet delivered at the output);
//   - a write request for bank b holds off new channel outputs tagged b
//     (`in_block[b]`) and is granted once bank b is empty;
//   - a granted write is broadcast on the H write bus to the syndrome
//     calculator's copy and to every SRAM of that bank.
// Channel outputs of the other bank flow meanwhile.
//
// Interface: host writes use valid/ready carrying up to two columns per cycle
// (`wr_req.en` says which). `in_fire`/`out_fire` with their tags report
// traffic at the decoder's ports. `h_wr` is combinational from the request.
// Two tag-selected banks and rewriting one while the other decodes follow the
// published architecture; the drain-then-grant rule is this design's choice.
module h_bank_ctrl
  import grand_pkg::*;
#(
  parameter int unsigned CNT_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // host column writes
  input  logic              wr_valid,
  output logic              wr_ready,
  input  h_write_t          wr_req,
  // decoder traffic
  input  logic              in_fire,
  input  logic              in_tag,
  input  logic              out_fire,
  input  logic              out_tag,
  // to the decoder
  output logic [NBANKS-1:0] in_block,    // do not accept channel outputs for this bank
  output logic [NBANKS-1:0] bank_busy,   // bank has channel outputs in flight
  output h_write_t          h_wr
);

  logic [CNT_W-1:0] inflight [NBANKS];

  always_comb begin
    for (int b = 0; b < NBANKS; b++) begin
      bank_busy[b] = (inflight[b] != '0);
      in_block[b]  = wr_valid && (wr_req.bank == 1'(b));
    end
    wr_ready = !bank_busy[wr_req.bank];
    h_wr     = wr_req;
    h_wr.en  = (wr_valid && wr_ready) ? wr_req.en : 2'b00;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NBANKS; b++) inflight[b] <= '0;
    end else begin
      for (int b = 0; b < NBANKS; b++)
        inflight[b] <= inflight[b]
                     + CNT_W'(in_fire  && in_tag  == 1'(b))
                     - CNT_W'(out_fire && out_tag == 1'(b));
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    out_fire |-> inflight[out_tag] != '0 || (in_fire && in_tag == out_tag));
  a_no_input_to_written_bank: assert property (@(posedge clk) disable iff (!rst_n)
    !(in_fire && in_block[in_tag]));

endmodule
