// dwt97m_ref_pkg: reference model of the CCSDS 9/7M integer DWT used by the
// testbenches, written directly from the lifting equations and independent
// of the RTL's stage split.
//
// The 1D transform of x_0..x_{2N-1} uses the symmetric extension
// x_{-i} = x_i and x_{2N-1+i} = x_{2N-1-i}, which reproduces the special
// boundary filters of the recommendation, and D_{-1} = D_0 for C_0:
//   D_j = x_{2j+1} - floor(9/16 (x_{2j}+x_{2j+2}) - 1/16 (x_{2j-2}+x_{2j+4}) + 1/2)
//   C_j = x_{2j}   - floor(-(D_{j-1}+D_j)/4 + 1/2)
// Every coefficient is wrapped to the 20-bit signed format of the hardware.
// The 2D level transforms all rows first, then all columns of the two
// horizontal outputs; sub-bands are flat row-major queues.
package dwt97m_ref_pkg;

  typedef int img_t[$];

  function automatic int wrap20(longint v);
    longint m;
    m = v & 64'hF_FFFF;
    return (m >= 64'h8_0000) ? int'(m - 64'h10_0000) : int'(m);
  endfunction

  // floor(n / q) for q > 0
  function automatic longint fdiv(longint n, longint q);
    longint t;
    t = n / q;
    if ((n % q != 0) && (n < 0)) t = t - 1;
    return t;
  endfunction

  function automatic int sym(const ref img_t x, input int i);
    int n;
    n = x.size();
    if (i < 0)      return x[-i];
    if (i > n - 1)  return x[2 * (n - 1) - i];
    return x[i];
  endfunction

  function automatic void lift1d(const ref img_t x, ref img_t c, ref img_t d);
    int n;
    longint num;
    n = x.size() / 2;
    c.delete();
    d.delete();
    for (int j = 0; j < n; j++) begin
      num = 9 * (longint'(sym(x, 2*j)) + sym(x, 2*j+2))
            - (longint'(sym(x, 2*j-2)) + sym(x, 2*j+4)) + 8;
      d.push_back(wrap20(longint'(x[2*j+1]) - fdiv(num, 16)));
    end
    for (int j = 0; j < n; j++) begin
      num = 2 - (longint'(d[(j == 0) ? 0 : j-1]) + d[j]);
      c.push_back(wrap20(longint'(x[2*j]) - fdiv(num, 4)));
    end
  endfunction

  // Column transform of a w x h row-major array: lo/hi are w x h/2.
  function automatic void lift_cols(const ref img_t a, input int w, input int h,
                                    ref img_t lo, ref img_t hi);
    img_t col, c, d;
    lo.delete();
    hi.delete();
    for (int i = 0; i < w * h / 2; i++) begin
      lo.push_back(0);
      hi.push_back(0);
    end
    for (int x = 0; x < w; x++) begin
      col.delete();
      for (int y = 0; y < h; y++) col.push_back(a[y*w + x]);
      lift1d(col, c, d);
      for (int y = 0; y < h / 2; y++) begin
        lo[y*w + x] = c[y];
        hi[y*w + x] = d[y];
      end
    end
  endfunction

  // Row transform of a w x h row-major array: lo/hi are w/2 x h.
  function automatic void lift_rows(const ref img_t a, input int w, input int h,
                                    ref img_t lo, ref img_t hi);
    img_t row, c, d;
    lo.delete();
    hi.delete();
    for (int y = 0; y < h; y++) begin
      row.delete();
      for (int x = 0; x < w; x++) row.push_back(a[y*w + x]);
      lift1d(row, c, d);
      foreach (c[i]) lo.push_back(c[i]);
      foreach (d[i]) hi.push_back(d[i]);
    end
  endfunction

  // One 2D level: LL, LH (horizontal low, vertical high), HL, HH.
  function automatic void dwt2d(const ref img_t a, input int w, input int h,
                                ref img_t ll, ref img_t lh, ref img_t hl, ref img_t hh);
    img_t l, hp;
    lift_rows(a, w, h, l, hp);
    lift_cols(l, w / 2, h, ll, lh);
    lift_cols(hp, w / 2, h, hl, hh);
  endfunction

endpackage
