// Error shifter of the error generator.
//
// Produces LANES (16) error vectors per cycle by shifting the seed pattern
// towards the MSB: shifting left by s adds s to every bit position of the seed.
// A base shift register counts 0, 16, 32, ... for the current seed, and lane j
// carries the seed shifted by base + j. The lanes are built in BRANCHES (4)
// parallel branches: branch b first forms base + 4b, and its four lanes add
// 0..3 to that, which keeps each adder chain short.
//
// A lane whose highest bit would pass bit 127 is not valid (a further shift
// would drop a one and change the weight). A lane whose highest bit lands
// exactly on bit 127 raises its overflow flag: that is the last shift of this
// seed, and the distance logic answers with `advance`, which returns the base
// to zero for the next seed.
//
// Timing: lane outputs are combinational from the seed and the base register;
// base changes on the clock edge. While `run` is low the base is held at zero.
// 16 vectors per cycle, 4 branches and the overflow rule follow the published
// architecture; how the branches split the adders is this design's choice.
module error_shifter
  import grand_pkg::*;
#(
  parameter int unsigned LANES    = 16,
  parameter int unsigned BRANCHES = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    run,        // a seed is being shifted
  input  logic                    advance,    // last shifts of this seed: restart at 0
  input  sparse_err_t             seed,
  input  idx_t                    top,        // highest set bit of the seed
  output logic        [LANES-1:0] lane_valid,
  output sparse_err_t [LANES-1:0] lane_err,
  output logic        [LANES-1:0] overflow
);

  localparam int unsigned PER_BRANCH = LANES / BRANCHES;
  localparam int unsigned SW         = COL_W + 1;   // one spare bit to see a pass beyond N-1

  logic [SW-1:0] base;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                base <= '0;
    else if (!run || advance)  base <= '0;
    else                       base <= base + SW'(LANES);
  end

  always_comb begin
    for (int b = 0; b < BRANCHES; b++) begin
      logic [SW-1:0] branch_base;
      branch_base = base + SW'(b * PER_BRANCH);
      for (int j = 0; j < PER_BRANCH; j++) begin
        int unsigned   l;
        logic [SW-1:0] s;
        logic [SW-1:0] hi;
        l  = b * PER_BRANCH + j;
        s  = branch_base + SW'(j);
        hi = SW'(top) + s;
        lane_valid[l]  = run && (hi <= SW'(N - 1));
        overflow[l]    = run && (hi == SW'(N - 1));
        lane_err[l].hw = seed.hw;
        for (int k = 0; k < HW_MAX; k++)
          lane_err[l].pos[k] = idx_t'(SW'(seed.pos[k]) + s);
      end
    end
  end

  initial assert (LANES % BRANCHES == 0);

endmodule
