// Testbench helpers for the GRAND decoder: random codes, an encoder, and a
// software reference of the noise search.
//
// Codes are systematic: H = [A | I] with `rows` parity rows. Columns
// 0 .. N-rows-1 hold random bits in rows 0..rows-1 (A), column N-rows+r holds
// a one in row r (I). Rows from `rows` to M-1 are zero, as for a code of rate
// above the lowest supported one. A code-word puts data in bits 0..N-rows-1
// and sets bit N-rows+r to row r of A*u, so H*c = A*u xor A*u = 0.
// The reference search walks error vectors in the decoder's documented order
//   weight 1: bit s, s = 0..127
//   weight 2: bits {s, s+D1}, D1 = 1..127, s = 0..127-D1
//   weight 3: bits {s, s+D1, s+D1+D2}, D2 = 1..126, D1 = 1..127-D2, s = 0..
// and returns the first one with the channel output's syndrome.
package grand_tb_pkg;
  import grand_pkg::*;

  syn_t hmat [NBANKS][N];
  int   hrows [NBANKS];

  function automatic void make_h(int bank, int rows);
    hrows[bank] = rows;
    for (int c = 0; c < N; c++) begin
      syn_t col = '0;
      if (c < N - rows) begin
        for (int r = 0; r < rows; r++) col[r] = 1'($urandom);
      end else begin
        col[c - (N - rows)] = 1'b1;
      end
      hmat[bank][c] = col;
    end
  endfunction

  function automatic syn_t syndrome(int bank, cw_t v);
    syn_t s = '0;
    for (int c = 0; c < N; c++) if (v[c]) s ^= hmat[bank][c];
    return s;
  endfunction

  function automatic cw_t rand_vec();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  function automatic cw_t encode(int bank, cw_t data);
    cw_t  c = '0;
    syn_t s;
    int   rows = hrows[bank];
    for (int i = 0; i < N - rows; i++) c[i] = data[i];
    s = syndrome(bank, c);
    for (int r = 0; r < rows; r++) c[N - rows + r] = s[r];
    return c;
  endfunction

  // error vector of the given weight at distinct random positions
  function automatic cw_t rand_error(int w);
    cw_t e = '0;
    int  n = 0;
    while (n < w) begin
      int p = int'($urandom_range(N - 1, 0));
      if (!e[p]) begin e[p] = 1'b1; n++; end
    end
    return e;
  endfunction

  function automatic cw_t vec3(int w, int a, int b, int c);
    cw_t e = '0;
    e[a] = 1'b1;
    if (w > 1) e[b] = 1'b1;
    if (w > 2) e[c] = 1'b1;
    return e;
  endfunction

  // first error of weight min_w..max_w, in decoder order, with syndrome s
  function automatic bit ref_search(int bank, syn_t s, int min_w, int max_w,
                                    output cw_t e, output int w);
    e = '0;
    w = 0;
    if (min_w <= 1 && max_w >= 1)
      for (int p = 0; p < N; p++)
        if (hmat[bank][p] == s) begin e = vec3(1, p, 0, 0); w = 1; return 1; end
    if (min_w <= 2 && max_w >= 2)
      for (int d1 = 1; d1 < N; d1++)
        for (int p = 0; p + d1 < N; p++)
          if ((hmat[bank][p] ^ hmat[bank][p + d1]) == s) begin
            e = vec3(2, p, p + d1, 0); w = 2; return 1;
          end
    if (min_w <= 3 && max_w >= 3)
      for (int d2 = 1; d2 < N - 1; d2++)
        for (int d1 = 1; d1 + d2 < N; d1++)
          for (int p = 0; p + d1 + d2 < N; p++)
            if ((hmat[bank][p] ^ hmat[bank][p + d1] ^ hmat[bank][p + d1 + d2]) == s) begin
              e = vec3(3, p, p + d1, p + d1 + d2); w = 3; return 1;
            end
    return 0;
  endfunction

  // generator cycles to walk weights min_w..max_w with `lanes` lanes
  function automatic int gen_cycles(int min_w, int max_w, int lanes);
    int n = 0;
    if (min_w <= 1 && max_w >= 1) n += (N + lanes - 1) / lanes;
    if (min_w <= 2 && max_w >= 2)
      for (int d1 = 1; d1 < N; d1++) n += (N - d1 + lanes - 1) / lanes;
    if (min_w <= 3 && max_w >= 3)
      for (int d2 = 1; d2 < N - 1; d2++)
        for (int d1 = 1; d1 + d2 < N; d1++) n += (N - d1 - d2 + lanes - 1) / lanes;
    return n;
  endfunction

  // generator cycle (0-based) that issues error vector e of weight w, for a
  // generator walking weights min_w.. with `lanes` lanes
  function automatic int issue_cycle(cw_t e, int w, int min_w, int lanes);
    int pos[3];
    int k = 0, n = 0, d1, d2;
    for (int i = 0; i < N; i++) if (e[i] && k < 3) begin pos[k] = i; k++; end
    d1 = (w >= 2) ? pos[1] - pos[0] : 0;
    d2 = (w >= 3) ? pos[2] - pos[1] : 0;
    if (w >= 2 && min_w <= 1) n += (N + lanes - 1) / lanes;
    if (w == 2)
      for (int a = 1; a < d1; a++) n += (N - a + lanes - 1) / lanes;
    if (w == 3) begin
      if (min_w <= 2) n += gen_cycles(2, 2, lanes);
      for (int b = 1; b <= d2; b++)
        for (int a = 1; a + b < N; a++) begin
          if (b == d2 && a >= d1) break;
          n += (N - a - b + lanes - 1) / lanes;
        end
    end
    return n + pos[0] / lanes;
  endfunction

  // H write bus word for columns a and b of a bank
  function automatic h_write_t hw_word(int bank, int a, int b, bit two);
    h_write_t w;
    w.bank    = 1'(bank);
    w.en      = {two, 1'b1};
    w.addr[0] = idx_t'(a);
    w.addr[1] = idx_t'(b);
    w.data[0] = hmat[bank][a];
    w.data[1] = hmat[bank][b];
    return w;
  endfunction

endpackage
