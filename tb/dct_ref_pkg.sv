// dct_ref_pkg: reference models used by the testbenches.
//
// Written independently of the RTL: the adder cells are given here as plain
// truth tables (bit n of each table is the output for inputs {a,b,ci} = n),
// the approximate adder is a bit-serial loop over those tables, and the exact
// transform is a direct matrix product with the BC12 matrix T rather than the
// butterfly network of the RTL.
package dct_ref_pkg;

  typedef int vec8_t [8];
  typedef int cfg14_t [14];
  typedef int tile_t [8][8];

  // {cout table, sum table} for kind kinds 0..10 (FA, AMA1-4, AXA1-3, InXA1-3)
  function automatic logic [15:0] cell_tab(int c);
    case (c)
      0:  return {8'hE8, 8'h96};
      1:  return {8'hEC, 8'h82};
      2:  return {8'hE8, 8'h17};
      3:  return {8'hEC, 8'h13};
      4:  return {8'hF0, 8'h8E};
      5:  return {8'hF0, 8'hC3};
      6:  return {8'hE8, 8'hC3};
      7:  return {8'hE8, 8'h82};
      8:  return {8'hF0, 8'h3C};
      9:  return {8'hF0, 8'hAA};
      10: return {8'hF0, 8'h66};
      default: return {8'hE8, 8'h96};
    endcase
  endfunction

  // 14-bit ripple-carry add (or subtract) with nab inexact low positions;
  // returns the sign-extended 14-bit result.
  function automatic int ref_add(int a, int b, bit sub, int nab, int kind);
    logic [13:0] av, bv, s;
    logic        c;
    logic [15:0] t;
    logic [2:0]  n;
    av = a[13:0];
    bv = sub ? ~b[13:0] : b[13:0];
    c  = sub;
    for (int i = 0; i < 14; i++) begin
      t    = cell_tab(i < nab ? kind : 0);
      n    = {av[i], bv[i], c};
      s[i] = t[{1'b0, n}];
      c    = t[8 + 4'(n)];
    end
    return int'($signed(s));
  endfunction

  // Same dataflow as the 14 operations of the one-dimensional transform.
  function automatic vec8_t ref_dct1d(vec8_t x, cfg14_t nab, cfg14_t kind);
    vec8_t f;
    int a0, a1, a2, a3, b0, b1;
    a0   = ref_add(x[0], x[7], 0, nab[0], kind[0]);
    a1   = ref_add(x[1], x[6], 0, nab[1], kind[1]);
    a2   = ref_add(x[2], x[5], 0, nab[2], kind[2]);
    a3   = ref_add(x[3], x[4], 0, nab[3], kind[3]);
    f[1] = ref_add(x[0], x[7], 1, nab[4], kind[4]);
    f[3] = ref_add(x[4], x[3], 1, nab[5], kind[5]);
    f[5] = ref_add(x[5], x[2], 1, nab[6], kind[6]);
    f[7] = ref_add(x[6], x[1], 1, nab[7], kind[7]);
    b0   = ref_add(a0, a3, 0, nab[8], kind[8]);
    b1   = ref_add(a1, a2, 0, nab[9], kind[9]);
    f[4] = ref_add(a0, a3, 1, nab[10], kind[10]);
    f[6] = ref_add(a2, a1, 1, nab[11], kind[11]);
    f[0] = ref_add(b0, b1, 0, nab[12], kind[12]);
    f[2] = ref_add(b0, b1, 1, nab[13], kind[13]);
    return f;
  endfunction

  // f[u][v] of T * X * T' computed row pass, then column pass.
  function automatic tile_t ref_dct2d(tile_t x, cfg14_t nab, cfg14_t kind);
    tile_t y, f;
    vec8_t v, r;
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) v[j] = x[i][j];
      r = ref_dct1d(v, nab, kind);
      for (int j = 0; j < 8; j++) y[i][j] = r[j];
    end
    for (int c = 0; c < 8; c++) begin
      for (int i = 0; i < 8; i++) v[i] = y[i][c];
      r = ref_dct1d(v, nab, kind);
      for (int u = 0; u < 8; u++) f[u][c] = r[u];
    end
    return f;
  endfunction

  // BC12 transform matrix T[k][j] (entries -1, 0, 1).
  function automatic int t_bc12(int k, int j);
    case (k)
      0: return 1;
      1: return (j == 0) ? 1 : (j == 7) ? -1 : 0;
      2: return (j == 0 || j == 3 || j == 4 || j == 7) ? 1 : -1;
      3: return (j == 4) ? 1 : (j == 3) ? -1 : 0;
      4: return (j == 0 || j == 7) ? 1 : (j == 3 || j == 4) ? -1 : 0;
      5: return (j == 5) ? 1 : (j == 2) ? -1 : 0;
      6: return (j == 2 || j == 5) ? 1 : (j == 1 || j == 6) ? -1 : 0;
      7: return (j == 6) ? 1 : (j == 1) ? -1 : 0;
      default: return 0;
    endcase
  endfunction

  // Exact F = T * X * T' by two direct matrix products (T * X, then * T').
  function automatic tile_t exact_dct2d(tile_t x);
    tile_t g, f;
    for (int u = 0; u < 8; u++)
      for (int j = 0; j < 8; j++) begin
        g[u][j] = 0;
        for (int i = 0; i < 8; i++) g[u][j] += t_bc12(u, i) * x[i][j];
      end
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        f[u][v] = 0;
        for (int j = 0; j < 8; j++) f[u][v] += g[u][j] * t_bc12(v, j);
      end
    return f;
  endfunction

  // All-exact configuration.
  function automatic cfg14_t zeros14();
    cfg14_t z;
    foreach (z[i]) z[i] = 0;
    return z;
  endfunction

endpackage
