// Merges the decoded channel outputs of the decoder's stages onto the one
// output port.
//
// Sources, highest priority first: 0 = failures from the secondary block,
// 1 = weight-3 decodes, 2 = weight-1/2 decodes, 3 = code-words found by the
// syndrome calculator. Later stages go first because their channel outputs
// have waited longest. Each source holds its result until accepted, so the
// merge is a combinational priority mux; results can leave in a different
// order from their arrival, which the carried id identifies.
// The merge and its priority order are this design's choice.
module result_arbiter
  import grand_pkg::*;
#(
  parameter int unsigned NSRC = 4
) (
  input  logic    [NSRC-1:0] src_valid,
  output logic    [NSRC-1:0] src_ready,
  input  result_t [NSRC-1:0] src_res,
  output logic               out_valid,
  input  logic               out_ready,
  output result_t            out_res
);

  always_comb begin
    src_ready = '0;
    out_valid = 1'b0;
    out_res   = src_res[0];
    for (int i = NSRC - 1; i >= 0; i--)
      if (src_valid[i]) begin
        out_valid = 1'b1;
        out_res   = src_res[i];
        src_ready = NSRC'(out_ready) << i;
      end
  end

endmodule
