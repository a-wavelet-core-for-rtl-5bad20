// wt_ref_pkg: software reference of the CDF 2-2 (5/3) lifting transform for
// the testbenches, written directly from the equations and independent of
// the RTL structure (no contexts, no line memories, whole arrays at once).
//
//   d[n] = x[2n+1] - floor((x[2n] + x[2n+2]) / 2),  x[N] taken as x[N-2]
//   s[n] = x[2n]   + floor((d[n-1] + d[n]) / 4),    d[-1] taken as d[0]
//
// and its inverse. fwd2d transforms an image held as a flat row-major queue
// into its four sub-bands.
package wt_ref_pkg;

  typedef int arr_t[$];

  function automatic void fwd1d(input arr_t x, output arr_t s, output arr_t d);
    int n = x.size();
    int p = n / 2;
    s = {};
    d = {};
    for (int i = 0; i < p; i++) begin
      int e1 = (2*i + 2 < n) ? x[2*i + 2] : x[2*i];
      d.push_back(x[2*i + 1] - ((x[2*i] + e1) >>> 1));
    end
    for (int i = 0; i < p; i++) begin
      int dp = (i == 0) ? d[0] : d[i - 1];
      s.push_back(x[2*i] + ((dp + d[i]) >>> 2));
    end
  endfunction

  function automatic arr_t inv1d(input arr_t s, input arr_t d);
    arr_t x;
    int p = s.size();
    int e[$];
    for (int i = 0; i < p; i++) begin
      int dp = (i == 0) ? d[0] : d[i - 1];
      e.push_back(s[i] - ((dp + d[i]) >>> 2));
    end
    x = {};
    for (int i = 0; i < p; i++) begin
      int e1 = (i + 1 < p) ? e[i + 1] : e[i];
      x.push_back(e[i]);
      x.push_back(d[i] + ((e[i] + e1) >>> 1));
    end
    return x;
  endfunction

  // img: w x h row-major. Sub-bands: (w/2) x (h/2) row-major each.
  // ll/lh come from the horizontal smooth columns (vertical smooth/detail),
  // hl/hh from the horizontal detail columns.
  function automatic void fwd2d(input arr_t img, input int w, input int h,
                                output arr_t ll, output arr_t lh,
                                output arr_t hl, output arr_t hh);
    arr_t lo, hi, row, s, d, col, cs, cd;
    lo = {}; hi = {};
    for (int r = 0; r < h; r++) begin
      row = {};
      for (int c = 0; c < w; c++) row.push_back(img[r*w + c]);
      fwd1d(row, s, d);
      lo = {lo, s};
      hi = {hi, d};
    end
    ll = {}; lh = {}; hl = {}; hh = {};
    for (int i = 0; i < (w/2) * (h/2); i++) begin
      ll.push_back(0); lh.push_back(0); hl.push_back(0); hh.push_back(0);
    end
    for (int k = 0; k < w/2; k++) begin
      col = {};
      for (int r = 0; r < h; r++) col.push_back(lo[r*(w/2) + k]);
      fwd1d(col, cs, cd);
      for (int m = 0; m < h/2; m++) begin
        ll[m*(w/2) + k] = cs[m];
        lh[m*(w/2) + k] = cd[m];
      end
      col = {};
      for (int r = 0; r < h; r++) col.push_back(hi[r*(w/2) + k]);
      fwd1d(col, cs, cd);
      for (int m = 0; m < h/2; m++) begin
        hl[m*(w/2) + k] = cs[m];
        hh[m*(w/2) + k] = cd[m];
      end
    end
  endfunction

endpackage
