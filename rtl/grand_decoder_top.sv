// GRAND decoder: a universal maximum-likelihood channel decoder for binary
// linear codes of length 128 that guesses the noise instead of the code-word.
//
// A channel output y = c xor e is a code-word exactly when its syndrome H y is
// zero. Otherwise the decoder tries error vectors e' in order of decreasing
// likelihood on a binary symmetric channel (lighter first) until H e' = H y;
// y xor e' is then the decoded code-word. Only H is needed, so any linear code
// with n = 128 and n - k <= 44 can be decoded, and two H banks can be swapped
// per code-word to re-randomise the code-book.
//
// Data path:
//   input -> syndrome_calc --(zero)------------------------------> output
//                          --(non-zero)-> FIFO -> primary block ---> output
//                                  (weights 1, 2)  |
//                                                  +-> FIFO -> secondary block -> output
//                                                          (weight 3)  +-> failure -> output
// The three stages work on different channel outputs at once, so a long
// weight-3 search does not hold up the common weight-0..2 cases. Results can
// leave out of order; `out_res.id` returns the label given at the input.
//
// H is written column by column through the host write port (two columns per
// cycle); the bank controller grants a write to a bank only while none of its
// channel outputs is inside, and meanwhile the other bank keeps decoding.
//
// Ports: `in_*` valid/ready with y, its bank tag and an id; `out_*` valid/ready
// with a result (status, code-word, error vector); `hw_*` valid/ready host
// writes of H columns; status outputs for the two banks and the two blocks.
// Latency (input accepted to result delivered, idle stages, no back-pressure):
// 1 cycle for a code-word, 5 + floor(b/16) for a single error at bit b, and
// up to 8 + 568 primary plus 25256 secondary generator cycles for weight 3.
// One channel output per cycle enters while the stages keep up.
// The stage split, the bank scheme and the weight limit follow the published
// GRAND chip architecture; the FIFOs, handshakes, ids and the merge of the
// result streams are this design's own choices.
module grand_decoder_top
  import grand_pkg::*;
#(
  parameter int unsigned LANES         = 16,  // error vectors tried per cycle per block
  parameter int unsigned BRANCHES      = 4,   // adder branches in the error shifter
  parameter int unsigned PRIMARY_FIFO  = 4,   // channel outputs waiting for the primary block
  parameter int unsigned SECONDARY_FIFO = 4   // channel outputs waiting for the secondary block
) (
  input  logic              clk,
  input  logic              rst_n,
  // channel outputs
  input  logic              in_valid,
  output logic              in_ready,
  input  cw_t               in_y,
  input  logic              in_tag,
  input  logic [ID_W-1:0]   in_id,
  // decoded results
  output logic              out_valid,
  input  logic              out_ready,
  output result_t           out_res,
  // host writes of H columns
  input  logic              hw_valid,
  output logic              hw_ready,
  input  h_write_t          hw_req,
  // status
  output logic [NBANKS-1:0] bank_busy,
  output logic              primary_busy,
  output logic              secondary_busy
);

  // ---------------- H bank control ----------------
  h_write_t          h_wr;
  logic [NBANKS-1:0] in_block;
  logic              in_fire, out_fire;

  assign in_fire  = in_valid && in_ready;
  assign out_fire = out_valid && out_ready;

  h_bank_ctrl u_bank (
    .clk, .rst_n,
    .wr_valid(hw_valid), .wr_ready(hw_ready), .wr_req(hw_req),
    .in_fire, .in_tag, .out_fire, .out_tag(out_res.tag),
    .in_block, .bank_busy, .h_wr
  );

  // ---------------- syndrome calculator ----------------
  logic syn_in_ready, syn_valid, syn_ready, syn_zero;
  job_t in_job, syn_job;

  always_comb begin
    in_job     = '0;
    in_job.id  = in_id;
    in_job.tag = in_tag;
    in_job.y   = in_y;
  end

  assign in_ready = syn_in_ready && !in_block[in_tag];

  syndrome_calc u_syn (
    .clk, .rst_n, .h_wr,
    .in_valid(in_valid && !in_block[in_tag]), .in_ready(syn_in_ready), .in_job,
    .out_valid(syn_valid), .out_ready(syn_ready), .out_job(syn_job), .out_zero(syn_zero)
  );

  // ---------------- primary block: weights 1 and 2 ----------------
  logic pq_in_ready, pq_valid, pq_ready;
  job_t pq_job;

  sync_fifo #(.T(job_t), .DEPTH(PRIMARY_FIFO)) u_pq (
    .clk, .rst_n,
    .in_valid(syn_valid && !syn_zero), .in_ready(pq_in_ready), .in_data(syn_job),
    .out_valid(pq_valid), .out_ready(pq_ready), .out_data(pq_job)
  );

  localparam int unsigned NSRC = 4;
  logic    [NSRC-1:0] src_valid, src_ready;
  result_t [NSRC-1:0] src_res;

  logic p_fwd_valid, p_fwd_ready;
  job_t p_fwd_job;
  logic p_busy_bank;

  noise_search_block #(.MIN_HW(1), .MAX_HW(2), .LANES(LANES), .BRANCHES(BRANCHES)) u_primary (
    .clk, .rst_n, .h_wr,
    .in_valid(pq_valid), .in_ready(pq_ready), .in_job(pq_job),
    .res_valid(src_valid[2]), .res_ready(src_ready[2]), .res(src_res[2]),
    .fwd_valid(p_fwd_valid), .fwd_ready(p_fwd_ready), .fwd_job(p_fwd_job),
    .busy(primary_busy), .busy_bank(p_busy_bank)
  );

  // ---------------- secondary block: weight 3 ----------------
  logic sq_valid, sq_ready;
  job_t sq_job;

  sync_fifo #(.T(job_t), .DEPTH(SECONDARY_FIFO)) u_sq (
    .clk, .rst_n,
    .in_valid(p_fwd_valid), .in_ready(p_fwd_ready), .in_data(p_fwd_job),
    .out_valid(sq_valid), .out_ready(sq_ready), .out_data(sq_job)
  );

  logic s_fwd_valid;
  job_t s_fwd_job;
  logic s_busy_bank;

  noise_search_block #(.MIN_HW(3), .MAX_HW(3), .LANES(LANES), .BRANCHES(BRANCHES)) u_secondary (
    .clk, .rst_n, .h_wr,
    .in_valid(sq_valid), .in_ready(sq_ready), .in_job(sq_job),
    .res_valid(src_valid[1]), .res_ready(src_ready[1]), .res(src_res[1]),
    .fwd_valid(s_fwd_valid), .fwd_ready(src_ready[0]), .fwd_job(s_fwd_job),
    .busy(secondary_busy), .busy_bank(s_busy_bank)
  );

  // ---------------- results ----------------
  // 0: no error of weight <= 3 explains y - abandoned, re-transmission expected
  assign src_valid[0]          = s_fwd_valid;
  assign src_res[0].id         = s_fwd_job.id;
  assign src_res[0].tag        = s_fwd_job.tag;
  assign src_res[0].status     = DEC_FAIL;
  assign src_res[0].codeword   = s_fwd_job.y;
  assign src_res[0].error      = '0;
  // 3: y is already a code-word
  assign src_valid[3]          = syn_valid && syn_zero;
  assign src_res[3].id         = syn_job.id;
  assign src_res[3].tag        = syn_job.tag;
  assign src_res[3].status     = DEC_HW0;
  assign src_res[3].codeword   = syn_job.y;
  assign src_res[3].error      = '0;

  assign syn_ready = syn_zero ? src_ready[3] : pq_in_ready;

  result_arbiter #(.NSRC(NSRC)) u_arb (
    .src_valid, .src_ready, .src_res,
    .out_valid, .out_ready, .out_res
  );

  // a bank being rewritten has nothing of its own inside the search blocks
  a_bank_idle_on_write: assert property (@(posedge clk) disable iff (!rst_n)
    (|h_wr.en) |-> !(primary_busy && p_busy_bank == h_wr.bank)
                && !(secondary_busy && s_busy_bank == h_wr.bank));

endmodule
