// dct_pkg: shared constants and the cosine coefficient table of the DCT/IDCT
// datapath.
//
// The N-point DCT used throughout is the orthonormal one,
//   Y(p) = sqrt(2/N) * E(p) * sum_i X(i) * cos((2i+1) p pi / 2N),
//   E(0) = 1/sqrt(2), E(p>0) = 1,
// so that two passes (rows and columns) give the 2D DCT including its 2/N
// E(p)E(q) scale factor, and the inverse is the transposed matrix. Each
// coefficient is held as a B-bit two's complement number with B-1 fraction
// bits, rounded to nearest:
//   coef(p, i) = round(2^(B-1) * sqrt(2/N) * E(p) * cos((2i+1) p pi / 2N)).
// Folding the scale factor into the stored coefficients is a choice of this
// design; the derivation of the architecture leaves it out.
package dct_pkg;

  // Fraction bits of a coefficient, for a B-bit word.
  function automatic int coef_frac(int b);
    return b - 1;
  endfunction

  // Accumulator (final adder) width of a vector inner product: a B-bit
  // coefficient times a (B+1)-bit pre-added sample, summed N/2 times.
  function automatic int acc_width(int n, int b);
    return 2 * b + $clog2(n / 2) + 1;
  endfunction

  // Coefficient c(p, i) scaled by 2^(B-1), saturated to the B-bit range.
  function automatic int coef(int n, int b, int p, int i);
    real e;
    real v;
    int  r;
    int  lim;
    e   = (p == 0) ? $sqrt(0.5) : 1.0;
    v   = $sqrt(2.0 / n) * e * $cos((2 * i + 1) * p * 3.14159265358979323846 / (2.0 * n));
    v   = v * (2.0 ** (b - 1));
    r   = (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
    lim = (1 << (b - 1)) - 1;
    if (r > lim) r = lim;
    if (r < -lim - 1) r = -lim - 1;
    return r;
  endfunction

endpackage
