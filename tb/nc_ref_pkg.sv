// nc_ref_pkg: reference models for the noise cancelling testbenches.
//
// Straightforward behavioural versions of the arithmetic, written from the
// equations rather than from the RTL structure: the pyramidal 3x3 filter
// with edge replication and rounding, the column gain coefficients
// (triangular 17-tap low-pass reference, ratio, dynamics-weighted blend,
// Q2.14) and the per-pixel gain multiplication with rounding and
// saturation. Images are kept in a dynamic array of lines.
package nc_ref_pkg;
  localparam int ONE = 1 << 14;

  typedef int line_t[];
  typedef line_t img_t[];

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : ((v > hi) ? hi : v);
  endfunction

  function automatic img_t pyramid(img_t a);
    img_t o;
    int H, W, s;
    H = a.size();
    W = a[0].size();
    o = new[H];
    for (int r = 0; r < H; r++) begin
      o[r] = new[W];
      for (int c = 0; c < W; c++) begin
        s = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            s += a[clampi(r + dr, 0, H - 1)][clampi(c + dc, 0, W - 1)]
                 * (dr == 0 ? 2 : 1) * (dc == 0 ? 2 : 1);
        o[r][c] = (s + 8) / 16;
      end
    end
    return o;
  endfunction

  // column gain coefficients of an image's column sums
  function automatic line_t coefs(line_t sums, bit atten);
    line_t ck;
    longint c[], dh[];
    longint dhmax, fir, den, d, ratio, w, v;
    int n;
    dhmax = 0;
    n = sums.size();
    ck = new[n];
    c  = new[n];
    dh = new[n];
    for (int i = 0; i < n; i++) begin
      fir = 0;
      for (int m = -8; m <= 8; m++)
        fir += (9 - (m < 0 ? -m : m)) * sums[clampi(i + m, 0, n - 1)];
      den = 81 * sums[i];
      if (den == 0) c[i] = ONE;
      else begin
        c[i] = (fir * ONE) / den;
        if (c[i] > 65535) c[i] = 65535;
      end
      d = sums[clampi(i + 2, 0, n - 1)] + 2 * sums[clampi(i + 1, 0, n - 1)]
        - 2 * sums[clampi(i - 1, 0, n - 1)] - sums[clampi(i - 2, 0, n - 1)];
      dh[i] = (d < 0) ? -d : d;
      if (dh[i] > dhmax) dhmax = dh[i];
    end
    for (int i = 0; i < n; i++) begin
      ratio = (dhmax == 0) ? 0 : (dh[i] * ONE) / dhmax;
      if (ratio > ONE) ratio = ONE;
      w = atten ? ONE - ratio : ratio;
      v = ONE + (((c[i] - ONE) * w) >>> 14);
      ck[i] = (v < 0) ? 0 : int'(v);
    end
    return ck;
  endfunction

  function automatic int gain(int px, int ck);
    longint p;
    p = (longint'(px) * ck + (ONE / 2)) >>> 14;
    return (p > 1023) ? 1023 : int'(p);
  endfunction

  function automatic line_t colsums_of(img_t a);
    line_t s;
    s = new[a[0].size()];
    foreach (s[c]) s[c] = 0;
    foreach (a[r]) foreach (a[r][c]) s[c] += a[r][c];
    return s;
  endfunction
endpackage
