// fp_ref_pkg: conversions between single-precision bit patterns and real
// (double precision) for the floating-point testbenches, written from the
// IEEE-754 field layouts. r2fp rounds to nearest even and flushes results
// below the normal range to zero, matching the arithmetic under test.
package fp_ref_pkg;
  function automatic real fp2r(input logic [31:0] a);
    logic [63:0] d;
    if (a[30:23] == 8'd0) return 0.0;
    d = {a[31], 11'(int'(a[30:23]) - 127 + 1023), a[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2fp(input real r);
    logic [63:0] d;
    int          e;
    logic [23:0] m;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return 32'd0;
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b0, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 24'd1;
    if (m[23]) e = e + 1;
    if (e <= 0) return 32'd0;
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // Distance in units of the last place between two normal numbers of the
  // same sign (large when the signs differ).
  function automatic int ulp_dist(input logic [31:0] a, input logic [31:0] b);
    longint da;
    if (a[31] != b[31] && (a[30:0] != 0 || b[30:0] != 0)) return 1 << 30;
    da = longint'(a[30:0]) - longint'(b[30:0]);
    return int'(da < 0 ? -da : da);
  endfunction

  function automatic real rabs(input real x);
    return x < 0.0 ? -x : x;
  endfunction

  // Random single-precision value with magnitude in [2^lo, 2^hi) and
  // random sign.
  function automatic logic [31:0] rand_fp(input int lo, input int hi);
    int e;
    e = 127 + lo + int'($urandom_range(0, hi - lo - 1));
    return {1'($urandom_range(0, 1)), 8'(e), 23'($urandom)};
  endfunction
endpackage
