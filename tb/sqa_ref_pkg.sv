// sqa_ref_pkg: reference model used by the testbenches.
//
// Works on a whole block held as a 2-D array, written directly from the
// definitions (1x3 median with replicated edges, mean/range/gradient energy,
// four threshold rules) and independent of the streaming hardware.
package sqa_ref_pkg;
  import sqa_pkg::*;

  localparam int MAXB = 32;
  typedef byte unsigned blk_t [MAXB][MAXB];

  function automatic byte unsigned med3(byte unsigned a, byte unsigned b, byte unsigned c);
    byte unsigned s [3];
    byte unsigned t;
    s[0] = a; s[1] = b; s[2] = c;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2 - i; j++)
        if (s[j] > s[j+1]) begin t = s[j]; s[j] = s[j+1]; s[j+1] = t; end
    return s[1];
  endfunction

  function automatic blk_t denoise(blk_t b, int n);
    blk_t o;
    o = b;
    for (int y = 0; y < n; y++)
      for (int x = 0; x < n; x++)
        o[y][x] = med3(b[y][(x == 0) ? 0 : x - 1], b[y][x], b[y][(x == n - 1) ? n - 1 : x + 1]);
    return o;
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic features_t features(blk_t b, int n);
    features_t f;
    int sum, mx, mn, g;
    sum = 0; mx = 0; mn = 255; g = 0;
    for (int y = 0; y < n; y++)
      for (int x = 0; x < n; x++) begin
        int p;
        p = int'(b[y][x]);
        sum += p;
        if (p > mx) mx = p;
        if (p < mn) mn = p;
        if (x > 0) g += iabs(int'(b[y][x]) - int'(b[y][x-1]));
        if (y > 0) g += iabs(int'(b[y][x]) - int'(b[y-1][x]));
      end
    f.mean  = 8'(sum / (n * n));
    f.range = 8'(mx - mn);
    f.grad  = ((g / 16) > 65535) ? 16'hFFFF : 16'(g / 16);
    return f;
  endfunction

  function automatic logic [3:0] rules(features_t f, thresholds_t t);
    logic [3:0] r;
    r = '0;
    r[R_DARK]   = f.mean < t.mean_lo;
    r[R_BRIGHT] = f.mean > t.mean_hi;
    r[R_RANGE]  = f.range > t.range_hi;
    r[R_GRAD]   = f.grad > t.grad_hi;
    return r;
  endfunction

endpackage
