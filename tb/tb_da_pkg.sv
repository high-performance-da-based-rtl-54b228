// tb_da_pkg: reference models for the DA transform testbenches.
//
// The models work bit by bit and with plain integer and real arithmetic,
// independently of the RTL's structure:
//   * da_word   : a DA partial-sum word, built from coefficient bits
//   * oat_ref   : the optimized adder tree, summed one bit at a time with
//                 each bit's own weight; bits below the kept columns are
//                 dropped and the compensation constant is derived with
//                 real arithmetic
//   * dct8_ref, dwt8_ref, dht8_ref : bit-exact core models
//   * *_true    : the mathematically exact transforms (real cos/sqrt)
package tb_da_pkg;

  typedef longint vec8_t [8];
  typedef real    rvec8_t [8];
  typedef longint words_t [16];

  localparam real PI = 3.14159265358979323846;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Coefficient bit of position j (0 = sign bit) of a Q-bit constant.
  function automatic int cbit(int c, int q, int j);
    return (c >> (q - 1 - j)) & 1;
  endfunction

  // DA word j of sum_i coef[i]*u[i] (n inputs).
  function automatic longint da_word(int q, int j, int n, int coef [4], longint u [4]);
    longint s = 0;
    for (int i = 0; i < n; i++) if (cbit(coef[i], q, j) == 1) s += u[i];
    return s;
  endfunction

  // Compensation constant in units of 2^-keep.
  function automatic longint oat_comp(int frac, int keep);
    real c = 0.5;
    for (int col = keep + 1; col <= frac; col++)
      c += real'(frac + 1 - col) * (2.0 ** (-(col + 1)));
    return longint'($floor(c * (2.0 ** keep) + 0.5));
  endfunction

  // Optimized adder tree, bit by bit. Word j weight 2^(E-j), E = q-1-frac,
  // word 0 negative. Words are p-bit two's complement.
  function automatic longint oat_ref(int p, int q, int frac, int keep, words_t y);
    longint acc = 0;                   // units 2^-keep
    int e = q - 1 - frac;
    for (int j = 0; j < q; j++) begin
      for (int b = 0; b < p; b++) begin
        int col = e - j + b;
        if (((y[j] >> b) & 1) == 1 && col >= -keep) begin
          longint v = longint'(1) << (col + keep);
          if (b == p - 1) v = -v;      // sign bit of the word
          if (j == 0)     v = -v;      // sign bit of the coefficient
          acc += v;
        end
      end
    end
    acc += oat_comp(frac, keep);
    return acc >>> keep;
  endfunction

  // Exact weighted sum of the same words.
  function automatic real oat_exact(int q, int frac, words_t y);
    real s = 0.0;
    int e = q - 1 - frac;
    for (int j = 0; j < q; j++)
      s += (j == 0 ? -1.0 : 1.0) * real'(y[j]) * (2.0 ** (e - j));
    return s;
  endfunction

  // Wrap a value to p-bit two's complement (what a p-bit word holds).
  function automatic longint wrapp(longint v, int p);
    longint m = (longint'(1) << p) - 1;
    longint r = v & m;
    if (((r >> (p - 1)) & 1) == 1) r -= (longint'(1) << p);
    return r;
  endfunction

  // One output of a DA core: inner product of n inputs with coef, through
  // DA words and the tree.
  function automatic longint da_out(int p, int q, int frac, int keep, int n,
                                    int coef [4], longint u [4]);
    words_t y;
    for (int j = 0; j < 16; j++) y[j] = 0;
    for (int j = 0; j < q; j++) y[j] = wrapp(da_word(q, j, n, coef, u), p);
    return oat_ref(p, q, frac, keep, y);
  endfunction

  // ---------------- 8-point DCT, butterfly structure ----------------
  function automatic int dct_c(int k);
    // round(256*cos(k*pi/16)), k = 1..7
    return int'($floor(256.0 * $cos(real'(k) * PI / 16.0) + 0.5));
  endfunction

  function automatic vec8_t dct8_ref(vec8_t x, int p, int keep);
    vec8_t z;
    longint a [4], b [4], u [4];
    int c [4];
    for (int m = 0; m < 4; m++) begin
      a[m] = x[m] + x[7-m];
      b[m] = x[m] - x[7-m];
    end
    // Z0, Z4 from A0 = a0+a3, A1 = a1+a2
    u = '{a[0] + a[3], a[1] + a[2], 0, 0};
    c = '{dct_c(4),  dct_c(4), 0, 0};  z[0] = da_out(p, 9, 8, keep, 2, c, u);
    c = '{dct_c(4), -dct_c(4), 0, 0};  z[4] = da_out(p, 9, 8, keep, 2, c, u);
    // Z2, Z6 from B0 = a0-a3, B1 = a1-a2
    u = '{a[0] - a[3], a[1] - a[2], 0, 0};
    c = '{dct_c(2),  dct_c(6), 0, 0};  z[2] = da_out(p, 9, 8, keep, 2, c, u);
    c = '{dct_c(6), -dct_c(2), 0, 0};  z[6] = da_out(p, 9, 8, keep, 2, c, u);
    // odd outputs: coefficient of b_m in Z_k is round(256 cos((2m+1)k pi/16))
    for (int k = 1; k < 8; k += 2) begin
      for (int m = 0; m < 4; m++)
        c[m] = int'($floor(256.0 * $cos(real'((2*m+1)*k) * PI / 16.0) + 0.5));
      z[k] = da_out(p, 9, 8, keep, 4, c, b);
    end
    return z;
  endfunction

  function automatic rvec8_t dct8_true(vec8_t x);
    rvec8_t z;
    for (int n = 0; n < 8; n++) begin
      z[n] = 0.0;
      for (int m = 0; m < 8; m++)
        z[n] += real'(x[m]) * $cos(real'((2*m+1)*n) * PI / 16.0);
      if (n == 0) z[n] = z[n] / $sqrt(2.0);
    end
    return z;
  endfunction

  // ---------------- 8x8 2-D DCT, row-column ----------------
  typedef longint blk_t [8][8];
  typedef real    rblk_t [8][8];

  // Result column by column: r[c][u] = coefficient (vertical u, horizontal c).
  // Row core words are p_row bits, column core words p_col bits.
  function automatic blk_t dct2_ref(blk_t x, int p_row, int p_col, int keep);
    blk_t rows, r;
    vec8_t v, o;
    for (int i = 0; i < 8; i++) begin
      for (int m = 0; m < 8; m++) v[m] = x[i][m];
      o = dct8_ref(v, p_row, keep);
      for (int m = 0; m < 8; m++) rows[i][m] = o[m];
    end
    for (int c = 0; c < 8; c++) begin
      for (int i = 0; i < 8; i++) v[i] = rows[i][c];
      o = dct8_ref(v, p_col, keep);
      for (int u = 0; u < 8; u++) r[c][u] = o[u];
    end
    return r;
  endfunction

  function automatic rblk_t dct2_true(blk_t x);
    rblk_t r;
    for (int c = 0; c < 8; c++)
      for (int u = 0; u < 8; u++) begin
        real s = 0.0;
        for (int i = 0; i < 8; i++)
          for (int m = 0; m < 8; m++)
            s += real'(x[i][m]) *
                 ((u == 0) ? 1.0 / $sqrt(2.0) : $cos(real'((2*i+1)*u) * PI / 16.0)) *
                 ((c == 0) ? 1.0 / $sqrt(2.0) : $cos(real'((2*m+1)*c) * PI / 16.0));
        r[c][u] = s;
      end
    return r;
  endfunction

  // ---------------- 8-point Haar DWT ----------------
  function automatic vec8_t dwt8_ref(vec8_t x, int p, int keep);
    vec8_t z;
    longint t [8];
    longint u [4];
    int c [4];
    longint pk [4];
    for (int k = 0; k < 4; k++) pk[k] = x[2*k] + x[2*k+1];
    t[0] = pk[0] + pk[1] + pk[2] + pk[3];
    t[1] = pk[0] + pk[1] - pk[2] - pk[3];
    t[2] = pk[0] - pk[1];
    t[3] = pk[2] - pk[3];
    for (int k = 0; k < 4; k++) t[4+k] = x[2*k] - x[2*k+1];
    for (int n = 0; n < 8; n++) begin
      c = '{(n < 2) ? 90 : (n < 4) ? 128 : 181, 0, 0, 0};
      u = '{t[n], 0, 0, 0};
      z[n] = da_out(p, 9, 8, keep, 1, c, u);
    end
    return z;
  endfunction

  function automatic rvec8_t dwt8_true(vec8_t x);
    rvec8_t z;
    real s8 = 1.0 / $sqrt(8.0);
    real s2 = 1.0 / $sqrt(2.0);
    z[0] = s8 * real'(x[0] + x[1] + x[2] + x[3] + x[4] + x[5] + x[6] + x[7]);
    z[1] = s8 * real'(x[0] + x[1] + x[2] + x[3] - x[4] - x[5] - x[6] - x[7]);
    z[2] = 0.5 * real'(x[0] + x[1] - x[2] - x[3]);
    z[3] = 0.5 * real'(x[4] + x[5] - x[6] - x[7]);
    for (int k = 0; k < 4; k++) z[4+k] = s2 * real'(x[2*k] - x[2*k+1]);
    return z;
  endfunction

  // ---------------- 8-point DHT ----------------
  // cas(2 pi n k / 8) in 7 fraction bits: 0, +-128 or +-181
  function automatic int dht_c(int n, int k);
    real v = $cos(2.0 * PI * real'(n * k) / 8.0) + $sin(2.0 * PI * real'(n * k) / 8.0);
    return int'($floor(128.0 * v + 0.5));
  endfunction

  function automatic vec8_t dht8_ref(vec8_t x, int p, int keep);
    vec8_t z;
    longint e [4], f [4];
    int c [4];
    for (int n = 0; n < 4; n++) begin
      e[n] = x[n] + x[n+4];
      f[n] = x[n] - x[n+4];
    end
    for (int k = 0; k < 8; k++) begin
      for (int n = 0; n < 4; n++) c[n] = dht_c(n, k);
      z[k] = da_out(p, 9, 7, keep, 4, c, (k % 2 == 0) ? e : f);
    end
    return z;
  endfunction

  function automatic rvec8_t dht8_true(vec8_t x);
    rvec8_t z;
    for (int k = 0; k < 8; k++) begin
      z[k] = 0.0;
      for (int n = 0; n < 8; n++)
        z[k] += real'(x[n]) * ($cos(2.0 * PI * real'(n * k) / 8.0) +
                               $sin(2.0 * PI * real'(n * k) / 8.0));
    end
    return z;
  endfunction

endpackage
