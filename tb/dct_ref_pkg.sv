// dct_ref_pkg: reference arithmetic for the DCT testbenches.
//
// Integer models of the transforms, written from the definitions and not from
// the RTL structure: coefficients round(2^(B-1) * sqrt(2/N) E(p)
// cos((2i+1)p pi/2N)), the folded 1D DCT of the cosine symmetry, the 1D
// inverse as the transposed matrix, and the truncate-and-saturate step. All
// sums are exact 64-bit integers. Vectors are held in arrays of MAXN entries
// of which the first n are used.
package dct_ref_pkg;

  localparam int MAXN = 16;

  typedef longint vec_t [MAXN];

  function automatic longint rcoef(int n, int b, int p, int i);
    real e, v;
    longint r, lim;
    e = (p == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    v = $sqrt(2.0 / n) * e * $cos(3.14159265358979323846 * real'((2 * i + 1) * p) / real'(2 * n));
    v = v * (2.0 ** (b - 1));
    if (v >= 0.0) r = longint'($floor(v + 0.5));
    else          r = -longint'($floor(-v + 0.5));
    lim = (longint'(1) << (b - 1)) - 1;
    if (r > lim) r = lim;
    if (r < -lim - 1) r = -lim - 1;
    return r;
  endfunction

  // Forward N-point DCT using c(p, N-1-i) = (-1)^p c(p, i).
  function automatic vec_t fwd1d(vec_t x, int n, int b);
    vec_t y;
    for (int p = 0; p < MAXN; p++) y[p] = 0;
    for (int p = 0; p < n; p++)
      for (int i = 0; i < n / 2; i++)
        y[p] += rcoef(n, b, p, i) * ((p % 2 == 0) ? (x[i] + x[n-1-i]) : (x[i] - x[n-1-i]));
    return y;
  endfunction

  // Inverse N-point DCT: x(k) = sum_p c(p, k) y(p), mirrored for k >= N/2.
  function automatic vec_t inv1d(vec_t y, int n, int b);
    vec_t x;
    for (int k = 0; k < MAXN; k++) x[k] = 0;
    for (int k = 0; k < n / 2; k++)
      for (int p = 0; p < n; p++) begin
        x[k]       += rcoef(n, b, p, k) * y[p];
        x[n-1-k]   += ((p % 2 == 0) ? 1 : -1) * rcoef(n, b, p, k) * y[p];
      end
    return x;
  endfunction

  // Arithmetic shift right (toward minus infinity), then saturate to b bits.
  function automatic longint cut(longint v, int sh, int b);
    longint t, lim;
    t   = v >>> sh;
    lim = (longint'(1) << (b - 1)) - 1;
    if (t > lim) return lim;
    if (t < -lim - 1) return -lim - 1;
    return t;
  endfunction

  function automatic bit saturates(longint v, int sh, int b);
    longint t, lim;
    t   = v >>> sh;
    lim = (longint'(1) << (b - 1)) - 1;
    return (t > lim) || (t < -lim - 1);
  endfunction

  // Random b-bit signed value.
  function automatic longint rnd(int b);
    longint v;
    v = longint'({$urandom, $urandom});
    v = v & ((longint'(1) << b) - 1);
    if (v >= (longint'(1) << (b - 1))) v -= (longint'(1) << b);
    return v;
  endfunction

endpackage
