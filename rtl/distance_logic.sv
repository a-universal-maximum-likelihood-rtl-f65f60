// Distance logic of the error generator.
//
// Every error vector of weight 1 to 3 is a seed pattern shifted towards the
// MSB. A seed always has bit 0 set and is described by two distances:
//   D1 = distance from bit 0 to the next one,
//   D2 = distance from that one to the third one,
// with (0,0) meaning the single-bit seed and D2 = 0 meaning a two-bit seed.
// This block is a pair of counters that steps (D1,D2) through every seed of the
// weights MIN_HW..MAX_HW, lowest weight first, since lighter errors are more
// likely on a binary symmetric channel:
//   weight 1: (0,0)
//   weight 2: (1,0), (2,0), ... (127,0)
//   weight 3: D2 = 1..126 in the outer loop, D1 = 1..127-D2 inner,
//             ending at (1,126).
// It moves to the next seed when the error shifter reports an overflow, i.e.
// a shifted copy of the seed has reached bit 127; the overflow flags of all
// lanes are ORed here. The seed order inside one weight is this design's
// choice (all vectors of one weight are equally likely).
//
// Timing: start loads the first seed on the next clock edge; `active` is high
// while seeds are being issued; `advance` (combinational) is high in a cycle
// whose shifted vectors end the current seed; `finish` is high with the
// advance of the last seed, after which `active` drops. `stop` stops the walk.
// The (D1,D2) scheme, the counters, the OR of the overflows and the final seed
// (1,126) follow the published architecture.
module distance_logic
  import grand_pkg::*;
#(
  parameter int unsigned MIN_HW = 1,
  parameter int unsigned MAX_HW = 2,
  parameter int unsigned LANES  = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             stop,
  input  logic [LANES-1:0] overflow,   // per-lane overflow from the error shifter
  output logic             active,
  output logic             advance,    // current seed done, step to the next
  output logic             finish,     // last seed done
  output idx_t             d1,
  output idx_t             d2
);

  localparam idx_t DMAX = idx_t'(N - 1);   // 127

  logic [1:0] hw;
  assign hw = (d1 == '0) ? 2'd1 : (d2 == '0) ? 2'd2 : 2'd3;

  logic last_seed;
  always_comb begin
    unique case (hw)
      2'd1:    last_seed = (MAX_HW == 1);
      2'd2:    last_seed = (d1 == DMAX) && (MAX_HW == 2);
      default: last_seed = (d2 == DMAX - 1);     // (1,126)
    endcase
  end

  assign advance = active && (|overflow);
  assign finish  = advance && last_seed;

  // first seed of a weight
  function automatic logic [2*COL_W-1:0] first_seed(int unsigned w);
    case (w)
      1:       return {idx_t'(0), idx_t'(0)};
      2:       return {idx_t'(1), idx_t'(0)};
      default: return {idx_t'(1), idx_t'(1)};
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      d1     <= '0;
      d2     <= '0;
    end else if (stop) begin
      active <= 1'b0;
    end else if (start) begin
      active     <= 1'b1;
      {d1, d2}   <= first_seed(MIN_HW);
    end else if (advance) begin
      if (last_seed) begin
        active <= 1'b0;
      end else begin
        unique case (hw)
          2'd1: {d1, d2} <= first_seed(2);
          2'd2: if (d1 == DMAX) {d1, d2} <= first_seed(3);
                else            d1 <= d1 + 1'b1;
          default:
                if (d1 + d2 == DMAX) begin
                  d1 <= idx_t'(1);
                  d2 <= d2 + 1'b1;
                end else begin
                  d1 <= d1 + 1'b1;
                end
        endcase
      end
    end
  end

endmodule
