// Reference models for the testbenches, written arithmetically rather than
// with the bit-level equations of the RTL.
//
// ref_round(x): nearest power of two of x, by comparing distances to the two
//   powers of two around x; a tie (x = 3*2^(p-2)) goes up, except x = 3 -> 2.
// ref_approx(a, b, n): sign(a*b) * (Ar*|B| + Br*|A| - Ar*Br) for n-bit
//   two's-complement a, b (n <= 32), as a 64-bit signed value.
// ref_pixel(mode, win): the 5x5 sharpen/smooth filter on one window using
//   ref_approx for every product.
package approx_ref_pkg;

  function automatic longint unsigned ref_round(longint unsigned x);
    longint unsigned lo, hi;
    if (x == 0) return 0;
    if (x == 3) return 2;
    lo = 1;
    while (lo * 2 <= x) lo = lo * 2;
    hi = lo * 2;
    if (x - lo < hi - x) return lo;
    return hi;
  endfunction

  function automatic longint ref_approx(longint a, longint b, int n);
    longint sa, sb;
    longint unsigned ma, mb, ar, br, mag;
    bit neg;
    // sign-extend from n bits
    sa = (a << (64 - n)) >>> (64 - n);
    sb = (b << (64 - n)) >>> (64 - n);
    neg = (sa < 0) ^ (sb < 0);
    ma = (sa < 0) ? longint'(-sa) : sa;
    mb = (sb < 0) ? longint'(-sb) : sb;
    ar = ref_round(ma);
    br = ref_round(mb);
    mag = ar * mb + br * ma - ar * br;
    return neg ? -longint'(mag) : longint'(mag);
  endfunction

  // mode 0 = sharpen (Gaussian, /273), mode 1 = smooth (/60)
  function automatic int ref_coef(bit mode, int m, int n);
    int g [5][5] = '{'{1, 4, 7, 4, 1}, '{4, 16, 26, 16, 4}, '{7, 26, 41, 26, 7},
                     '{4, 16, 26, 16, 4}, '{1, 4, 7, 4, 1}};
    int s [5][5] = '{'{1, 1, 1, 1, 1}, '{1, 4, 4, 4, 1}, '{1, 4, 12, 4, 1},
                     '{1, 4, 4, 4, 1}, '{1, 1, 1, 1, 1}};
    return mode ? s[m][n] : g[m][n];
  endfunction

  function automatic int ref_pixel(bit mode, int win [5][5], int mul_n);
    longint sum;
    longint y;
    sum = 0;
    for (int m = 0; m < 5; m++)
      for (int n = 0; n < 5; n++)
        sum += ref_approx(win[m][n], ref_coef(mode, m, n), mul_n);
    if (sum < 0) sum = 0;
    if (mode) y = (sum + 30) / 60;
    else      y = 2 * win[2][2] - (sum + 136) / 273;
    if (y < 0) y = 0;
    if (y > 255) y = 255;
    return int'(y);
  endfunction

  // exact filter, for measuring the error of the approximate one
  function automatic int exact_pixel(bit mode, int win [5][5]);
    longint sum, y;
    sum = 0;
    for (int m = 0; m < 5; m++)
      for (int n = 0; n < 5; n++)
        sum += win[m][n] * ref_coef(mode, m, n);
    if (mode) y = (sum + 30) / 60;
    else      y = 2 * win[2][2] - (sum + 136) / 273;
    if (y < 0) y = 0;
    if (y > 255) y = 255;
    return int'(y);
  endfunction

endpackage
