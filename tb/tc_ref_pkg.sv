// tc_ref_pkg: reference models of the target-calculator arithmetic, written
// from the algorithm statements (f = F b, the fast gradient method with
// projection on box bounds, diagonal unscaling, L theta) for use by the
// testbenches. Integer models reproduce the hardware's word formats
// (round-half-up on dropped bits, saturation to 35 bits); the real-valued
// FGM gives an independent check that the fixed-point iteration converges
// to the same point.
package tc_ref_pkg;
  localparam int VWID = 35;

  function automatic longint rs(input longint v, input int sh);
    longint r, mx, mn;
    mx = (64'sd1 <<< (VWID - 1)) - 1;
    mn = -(64'sd1 <<< (VWID - 1));
    r  = (sh > 0) ? ((v + (64'sd1 <<< (sh - 1))) >>> sh) : v;
    if (r > mx) r = mx;
    if (r < mn) r = mn;
    return r;
  endfunction

  // Matrix-vector product, exact accumulation, one final rounding.
  // The products here are at most 60 bits and the sums stay within 64 bits
  // for the magnitudes the testbenches use.
  function automatic void matvec(input int rows, input int cols, input int frac,
                                 input longint m [], input longint v [],
                                 output longint o []);
    o = new[rows];
    for (int r = 0; r < rows; r++) begin
      longint acc;
      acc = 0;
      for (int c = 0; c < cols; c++) acc += m[r*cols + c] * v[c];
      o[r] = rs(acc, frac);
    end
  endfunction

  // Fixed-point FGM: H sfix25_En23 (row-major), f/y/t/bounds sfix35_En21,
  // beta sfix25_En24.
  function automatic void fgm_fixed(input int n, input int iters,
                                    input longint h [], input longint f [],
                                    input longint tmax [], input longint tmin [],
                                    input longint beta, output longint t [],
                                    output int clips);
    longint y [], yn [], tn [];
    y = new[n]; yn = new[n]; t = new[n]; tn = new[n];
    for (int i = 0; i < n; i++) begin y[i] = 0; t[i] = 0; end
    clips = 0;
    for (int k = 0; k < iters; k++) begin
      clips = 0;
      for (int j = 0; j < n; j++) begin
        longint acc, g, st, d;
        acc = 0;
        for (int c = 0; c < n; c++) acc += h[j*n + c] * y[c];
        g  = rs(acc, 23) + f[j];
        st = y[j] - g;
        if (st > tmax[j]) begin st = tmax[j]; clips++; end
        else if (st < tmin[j]) begin st = tmin[j]; clips++; end
        d = st - t[j];
        tn[j] = st;
        yn[j] = rs(beta * d + (st <<< 24), 24);
      end
      for (int j = 0; j < n; j++) begin t[j] = tn[j]; y[j] = yn[j]; end
    end
  endfunction

  // Real-valued FGM on the same data (values already divided out of their
  // fixed-point scale).
  function automatic void fgm_real(input int n, input int iters, input real h [],
                                   input real f [], input real tmax [], input real tmin [],
                                   input real beta, output real t []);
    real y [], tn [];
    y = new[n]; t = new[n]; tn = new[n];
    for (int i = 0; i < n; i++) begin y[i] = 0.0; t[i] = 0.0; end
    for (int k = 0; k < iters; k++) begin
      for (int j = 0; j < n; j++) begin
        real g, st;
        g = f[j];
        for (int c = 0; c < n; c++) g += h[j*n + c] * y[c];
        st = y[j] - g;
        if (st > tmax[j]) st = tmax[j];
        if (st < tmin[j]) st = tmin[j];
        tn[j] = st;
      end
      for (int j = 0; j < n; j++) begin
        y[j] = tn[j] + beta * (tn[j] - t[j]);
        t[j] = tn[j];
      end
    end
  endfunction
endpackage
