// Error generator: emits candidate error vectors, lightest first, LANES per
// cycle.
//
// Three parts, chained as the error vectors are built:
//   distance_logic    - counters stepping the seed distances (D1,D2)
//   pattern_generator - (D1,D2) to the seed's bit positions
//   error_shifter     - 16 shifted copies of the seed per cycle, overflow flags
// Each weight w costs sum over its seeds of ceil((N - top)/LANES) cycles:
// 8 cycles for weight 1, 568 for weight 2 and 25256 for weight 3 with N = 128
// and 16 lanes. MIN_HW/MAX_HW pick the weights this instance covers (1..2 in
// the primary block, 3 in the secondary block).
//
// Timing: `start` (one cycle) begins the walk; the first lanes appear on the
// next cycle and a new set every cycle after that while `active` is high.
// `finish` marks the cycle carrying the last lanes. `stop` stops at once.
// Output error vectors are sparse: weight plus bit positions.
// The three-part structure follows the published architecture; the weight
// range parameters are this design's way of sharing it between the blocks.
module error_generator
  import grand_pkg::*;
#(
  parameter int unsigned MIN_HW   = 1,
  parameter int unsigned MAX_HW   = 2,
  parameter int unsigned LANES    = 16,
  parameter int unsigned BRANCHES = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    stop,
  output logic                    active,
  output logic                    finish,
  output logic        [LANES-1:0] lane_valid,
  output sparse_err_t [LANES-1:0] lane_err
);

  idx_t             d1, d2, top;
  logic [LANES-1:0] overflow;
  logic             advance;
  sparse_err_t      seed;

  distance_logic #(.MIN_HW(MIN_HW), .MAX_HW(MAX_HW), .LANES(LANES)) u_dist (
    .clk, .rst_n, .start, .stop, .overflow,
    .active, .advance, .finish, .d1, .d2
  );

  pattern_generator u_pat (
    .d1, .d2, .seed, .top,
    .seed_vec()   // the lanes carry bit positions, not the full vector
  );

  error_shifter #(.LANES(LANES), .BRANCHES(BRANCHES)) u_shift (
    .clk, .rst_n, .run(active), .advance, .seed, .top,
    .lane_valid, .lane_err, .overflow
  );

endmodule
