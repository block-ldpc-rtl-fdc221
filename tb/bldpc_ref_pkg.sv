// Reference arithmetic for the Block-LDPC testbenches, written straight from the matrix
// definitions (no pipelining, no scheduling): block multiplication as a cyclic rotation,
// region products of H, forward substitution through T, a direct encoder built from
// z2 = inv(Phi)(E inv(T) A z1 + C z1), z3 = inv(T)(A z1 + B z2), and the syndrome H*c.
package bldpc_ref_pkg;
  import bldpc_code_pkg::*;

  typedef logic [P-1:0] sv_t;
  typedef sv_t cw_t [N];
  typedef sv_t rv_t [M];

  // x multiplied by a block shifted right by d: bit r of the result is x[(r+d) mod P]
  function automatic sv_t rot(input sv_t x, input int unsigned d);
    sv_t y;
    for (int unsigned r = 0; r < P; r++) y[r] = x[(r + d) % P];
    return y;
  endfunction

  // product of the part of H in block rows [r0,r1) and block columns [c0,c1) with x
  function automatic rv_t hmul(input cw_t x, input int unsigned r0, r1, c0, c1);
    rv_t y;
    for (int i = 0; i < M; i++) y[i] = '0;
    for (int unsigned b = 0; b < NNZ; b++)
      if (H_ROW[b] >= r0 && H_ROW[b] < r1 && H_COL[b] >= c0 && H_COL[b] < c1)
        y[H_ROW[b]] ^= rot(x[H_COL[b]], H_SH[b]);
    return y;
  endfunction

  // y = inv(T) * x on block rows 0..NT-1 (T unit lower triangular at block level)
  function automatic rv_t tsolve(input rv_t x);
    rv_t y;
    for (int i = 0; i < M; i++) y[i] = '0;
    for (int unsigned r = 0; r < NT; r++) begin
      y[r] = x[r];
      for (int unsigned b = 0; b < NNZ; b++)
        if (H_ROW[b] == r && H_COL[b] >= TC0 && H_COL[b] - TC0 != r)
          y[r] ^= rot(y[H_COL[b] - TC0], H_SH[b]);
    end
    return y;
  endfunction

  // move the T-row part of a row vector into the T columns of a codeword-shaped vector
  function automatic cw_t rows_to_tcols(input rv_t v);
    cw_t c;
    for (int j = 0; j < N; j++) c[j] = '0;
    for (int unsigned r = 0; r < NT; r++) c[TC0 + r] = v[r];
    return c;
  endfunction

  function automatic cw_t encode(input cw_t info);
    cw_t c, t;
    rv_t u, w, e, bz;
    logic [G-1:0] ev, z2;
    c = info;
    for (int unsigned j = NI; j < N; j++) c[j] = '0;
    u = hmul(c, 0, NT, 0, NI);
    w = tsolve(u);
    t = rows_to_tcols(w);
    e = hmul(t, NT, M, TC0, N);
    begin
      rv_t v;
      v = hmul(c, NT, M, 0, NI);
      for (int unsigned i = 0; i < GAM; i++) ev[i*P +: P] = e[NT + i] ^ v[NT + i];
    end
    for (int unsigned r = 0; r < G; r++) z2[r] = ^(PHI_INV[r] & ev);
    for (int unsigned i = 0; i < GAM; i++) c[NI + i] = z2[i*P +: P];
    bz = hmul(c, 0, NT, NI, NI + GAM);
    for (int unsigned r = 0; r < NT; r++) bz[r] ^= u[r];
    w = tsolve(bz);
    for (int unsigned r = 0; r < NT; r++) c[TC0 + r] = w[r];
    return c;
  endfunction

  function automatic int unsigned syndrome_weight(input cw_t c);
    rv_t s;
    int unsigned n;
    s = hmul(c, 0, M, 0, N);
    n = 0;
    for (int i = 0; i < M; i++) n += $countones(s[i]);
    return n;
  endfunction
endpackage
