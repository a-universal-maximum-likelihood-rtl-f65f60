// Pattern generator of the error generator.
//
// Turns a distance pair (D1,D2) from the distance logic into the seed error
// pattern: the error vector with bit 0 set whose shifted copies the error
// shifter produces. The seed is
//   X = 1 + 2^D1 - [D1 = 0] + 2^(D1+D2) - [D2 = 0] * 2^D1,
// which gives bit 0 alone for (0,0), bits {0, D1} for D2 = 0 and bits
// {0, D1, D1+D2} otherwise. The error shifter works on bit positions, not on
// the 128-bit vector, so the main output is the positions of the ones (lowest
// first) with the weight; `top` is the highest position, which decides when a
// shifted copy overflows. The full vector X is given as well, built from the
// formula above.
// Purely combinational.
// The seed formula and the position output follow the published architecture.
module pattern_generator
  import grand_pkg::*;
(
  input  idx_t        d1,
  input  idx_t        d2,
  output sparse_err_t seed,    // weight and bit positions of the seed
  output idx_t        top,     // highest set bit of the seed
  output cw_t         seed_vec // the seed as an N-bit vector
);

  always_comb begin
    seed.pos[0] = '0;
    seed.pos[1] = d1;
    seed.pos[2] = d1 + d2;
    if (d1 == '0) begin
      seed.hw = 2'd1;
      top     = '0;
    end else if (d2 == '0) begin
      seed.hw = 2'd2;
      top     = d1;
    end else begin
      seed.hw = 2'd3;
      top     = d1 + d2;
    end
  end

  always_comb begin
    cw_t one;
    one      = cw_t'(1);
    seed_vec = one + (one << d1) - cw_t'(d1 == '0)
             + (one << (d1 + d2)) - ((d2 == '0) ? (one << d1) : '0);
  end

endmodule
