// Checks the structural rules of the code in bldpc_code_pkg: block list consistency, lower
// macro-block triangular T with identity diagonal, at most one block per block column inside
// each macro band of T, no 4-cycles, the variable degree distribution, and that PHI_INV
// really inverts Phi = E inv(T) B + D (checked as Phi * (inv(Phi) e) = e for unit vectors e,
// with Phi applied through the reference matrix products). A reference codeword must have a
// zero syndrome.
module tb_bldpc_code_pkg;
  import bldpc_code_pkg::*;
  import bldpc_ref_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int unsigned deg [N];
    int unsigned hist [6];
    bit four;
    cw_t c, info;
    foreach (deg[j]) deg[j] = 0;
    foreach (hist[j]) hist[j] = 0;
    for (int unsigned b = 0; b < NNZ; b++) begin
      deg[H_COL[b]]++;
      check(H_SH[b] < P, "shift range");
      check(b >= ROW_START[H_ROW[b]] && b < ROW_START[H_ROW[b] + 1], "row start table");
      if (H_ROW[b] < NT && H_COL[b] >= TC0) begin
        int unsigned t;
        t = H_COL[b] - TC0;
        if (t == H_ROW[b]) check(H_SH[b] == 0, "identity diagonal of T");
        else check(band_of(t) < band_of(H_ROW[b]), "T lower macro-block triangular");
      end
    end
    for (int unsigned r = 0; r < NT; r++) begin
      bit found;
      found = 0;
      for (int unsigned b = ROW_START[r]; b < ROW_START[r + 1]; b++)
        if (H_COL[b] == TC0 + r) found = 1;
      check(found, "diagonal block present");
    end
    // one block per block column inside a macro band of T
    for (int unsigned b1 = 0; b1 < NNZ; b1++)
      for (int unsigned b2 = b1 + 1; b2 < NNZ; b2++)
        if (H_ROW[b1] < NT && H_ROW[b2] < NT && H_COL[b1] == H_COL[b2] && H_COL[b1] >= TC0 &&
            band_of(H_ROW[b1]) == band_of(H_ROW[b2]))
          check(0, "two blocks in one column of a T band");
    // no 4-cycles
    four = 0;
    for (int unsigned a = 0; a < NNZ; a++)
      for (int unsigned b = ROW_START[H_ROW[a]]; b < ROW_START[H_ROW[a] + 1]; b++)
        if (b != a)
          for (int unsigned k = COL_START[H_COL[b]]; k < COL_START[H_COL[b] + 1]; k++) begin
            int unsigned c2;
            c2 = COL_PERM[k];
            if (H_ROW[c2] != H_ROW[a])
              for (int unsigned e = ROW_START[H_ROW[c2]]; e < ROW_START[H_ROW[c2] + 1]; e++)
                if (H_COL[e] == H_COL[a] &&
                    (H_SH[a] + P - H_SH[b] + H_SH[c2] + P - H_SH[e]) % P == 0) four = 1;
          end
    check(!four, "girth at least 6");
    foreach (deg[j]) if (deg[j] < 6) hist[deg[j]]++;
    check(hist[2] == 34 && hist[3] == 58 && hist[4] == 18 && hist[5] == 18, "variable degree distribution");
    // PHI_INV * Phi = identity, Phi applied by reference products
    for (int unsigned k = 0; k < G; k++) begin
      logic [G-1:0] unit, z;
      cw_t x;
      rv_t bz, w, ew;
      logic [G-1:0] back;
      unit = '0;
      unit[k] = 1'b1;
      for (int unsigned r = 0; r < G; r++) z[r] = ^(PHI_INV[r] & unit);
      foreach (x[j]) x[j] = '0;
      for (int unsigned i = 0; i < GAM; i++) x[NI + i] = z[i*P +: P];
      bz = hmul(x, 0, NT, NI, NI + GAM);
      w  = tsolve(bz);
      ew = hmul(rows_to_tcols(w), NT, M, TC0, N);
      bz = hmul(x, NT, M, NI, NI + GAM);
      for (int unsigned i = 0; i < GAM; i++) back[i*P +: P] = ew[NT + i] ^ bz[NT + i];
      check(back == unit, "Phi * inv(Phi) = I");
    end
    foreach (info[j]) info[j] = (j < NI) ? P'({$urandom, $urandom}) : '0;
    c = encode(info);
    check(syndrome_weight(c) == 0, "reference codeword has zero syndrome");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
