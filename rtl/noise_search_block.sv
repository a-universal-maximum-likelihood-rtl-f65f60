// Noise search block: guesses error vectors of weight MIN_HW..MAX_HW for one
// channel output at a time and stops at the first one whose syndrome equals
// the channel output's (H e = H y, so y xor e is a code-word).
//
// The decoder holds two of these. The primary block (MIN_HW = 1, MAX_HW = 2)
// sees every channel output with a non-zero syndrome; weight 1 and 2 errors
// are by far the common case. What it cannot decode it forwards to the
// secondary block (MIN_HW = MAX_HW = 3), which walks the much longer list of
// weight-3 errors while the primary block moves on to the next channel output.
// A channel output the secondary block cannot decode is forwarded again: the
// decoder then reports a failure, and a re-transmission is expected.
//
// Inside: an error generator issues LANES sparse error vectors per cycle in
// order of weight; LANES sparse multipliers read the H columns for each vector
// from the H bank named by the channel output's tag; one cycle later each
// product is compared with the syndrome. The lowest matching lane of the first
// matching cycle wins, which is the first match in generation order; the
// generator is then aborted.
//
// Interface: valid/ready on the input job and on both outputs (`res_*` for a
// decoded channel output, `fwd_*` for one passed on). One channel output is
// held at a time; `in_ready` is high only when idle.
// Timing: with the input accepted in cycle S, lanes are issued from S+1, a
// match among the lanes of cycle t is reported (res_valid) from t+2, and after
// the last lanes in cycle t the job is forwarded from t+2. For the primary
// block that is 3 + floor(b/16) cycles for a single error at bit b, and 578
// cycles (8 + 568 generator cycles + 2) for a channel output it cannot decode.
// The weight split between the blocks follows the published architecture; one
// multiplier set per lane, the lowest-lane pick and the handshakes are this
// design's choices.
module noise_search_block
  import grand_pkg::*;
#(
  parameter int unsigned MIN_HW   = 1,
  parameter int unsigned MAX_HW   = 2,
  parameter int unsigned LANES    = 16,
  parameter int unsigned BRANCHES = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  h_write_t h_wr,
  // channel output with non-zero syndrome
  input  logic     in_valid,
  output logic     in_ready,
  input  job_t     in_job,
  // decoded
  output logic     res_valid,
  input  logic     res_ready,
  output result_t  res,
  // not decoded here
  output logic     fwd_valid,
  input  logic     fwd_ready,
  output job_t     fwd_job,
  // status
  output logic     busy,
  output logic     busy_bank
);

  typedef enum logic [1:0] {S_IDLE, S_SEARCH, S_FOUND, S_MISS} state_e;
  state_e state;
  job_t   job;

  // ---------------- error generator ----------------
  logic                    gen_start, gen_abort, gen_active, gen_finish;
  logic        [LANES-1:0] lane_valid;
  sparse_err_t [LANES-1:0] lane_err;

  error_generator #(.MIN_HW(MIN_HW), .MAX_HW(MAX_HW), .LANES(LANES), .BRANCHES(BRANCHES)) u_gen (
    .clk, .rst_n, .start(gen_start), .stop(gen_abort),
    .active(gen_active), .finish(gen_finish), .lane_valid, .lane_err
  );

  // ---------------- multipliers, one per lane ----------------
  syn_t        [LANES-1:0] product;
  logic        [LANES-1:0] prod_valid;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    sparse_mvm #(.MAX_HW(MAX_HW)) u_mvm (
      .clk, .rst_n, .h_wr,
      .rd_en(lane_valid[l] && state == S_SEARCH), .rd_bank(job.tag), .err(lane_err[l]),
      .out_valid(prod_valid[l]), .product(product[l])
    );
  end

  // lanes delayed to line up with the SRAM read
  sparse_err_t [LANES-1:0] lane_err_q;
  logic                    finish_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lane_err_q <= '0;
      finish_q   <= 1'b0;
    end else begin
      lane_err_q <= lane_err;
      finish_q   <= gen_finish && state == S_SEARCH;
    end
  end

  // ---------------- compare and pick the first match ----------------
  logic [LANES-1:0] hit;
  logic             any_hit;
  sparse_err_t      hit_err;

  always_comb begin
    hit     = '0;
    any_hit = 1'b0;
    hit_err = lane_err_q[0];
    for (int l = 0; l < LANES; l++)
      hit[l] = prod_valid[l] && (product[l] == job.syn);
    for (int l = LANES - 1; l >= 0; l--)
      if (hit[l]) begin
        any_hit = 1'b1;
        hit_err = lane_err_q[l];
      end
  end

  function automatic cw_t expand(sparse_err_t e);
    cw_t v = '0;
    for (int k = 0; k < HW_MAX; k++)
      if (k < int'(e.hw)) v[e.pos[k]] = 1'b1;
    return v;
  endfunction

  // ---------------- control ----------------
  assign in_ready  = (state == S_IDLE);
  assign gen_start = (state == S_IDLE) && in_valid;
  assign gen_abort = (state == S_SEARCH) && any_hit;
  assign busy      = (state != S_IDLE);
  assign busy_bank = job.tag;
  assign res_valid = (state == S_FOUND);
  assign fwd_valid = (state == S_MISS);
  assign fwd_job   = job;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      job   <= '0;
      res   <= '0;
    end else begin
      unique case (state)
        S_IDLE:
          if (in_valid) begin
            job   <= in_job;
            state <= S_SEARCH;
          end
        S_SEARCH:
          if (any_hit) begin
            res.id       <= job.id;
            res.tag      <= job.tag;
            res.status   <= dec_status_e'({1'b0, hit_err.hw});
            res.error    <= expand(hit_err);
            res.codeword <= job.y ^ expand(hit_err);
            state        <= S_FOUND;
          end else if (finish_q) begin
            state <= S_MISS;
          end
        S_FOUND: if (res_ready) state <= S_IDLE;
        S_MISS:  if (fwd_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_lanes_while_active: assert property (@(posedge clk) disable iff (!rst_n)
    (|lane_valid) |-> gen_active);
  a_res_stable: assert property (@(posedge clk) disable iff (!rst_n)
    res_valid && !res_ready |=> res_valid && $stable(res));
  a_fwd_stable: assert property (@(posedge clk) disable iff (!rst_n)
    fwd_valid && !fwd_ready |=> fwd_valid && $stable(fwd_job));

endmodule
