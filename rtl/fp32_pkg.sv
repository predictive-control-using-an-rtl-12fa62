// fp32_pkg: IEEE-754 single-precision arithmetic used by the interior-point
// solver datapaths (the regulator QP solver works in single precision).
//
// Combinational functions; the modules that call them place registers
// around them. Rounding is round-to-nearest-even. Subnormal inputs and
// results are flushed to zero; overflow gives infinity; NaN and infinity
// inputs are not treated specially. These limits are this design's choice:
// the interior-point iterates stay well inside the normal range.
package fp32_pkg;
  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3f80_0000;
  localparam fp32_t FP_1P5  = 32'h3fc0_0000;

  function automatic fp32_t fp_pack(input logic s, input int e, input logic [22:0] m);
    if (e >= 255) return {s, 8'hff, 23'd0};
    else if (e <= 0) return FP_ZERO;
    else return {s, 8'(e), m};
  endfunction

  function automatic fp32_t fp_mul(input fp32_t a, input fp32_t b);
    logic        s;
    logic [47:0] p;
    logic [23:0] mr;   // 23-bit mantissa plus carry
    logic        g, st;
    int          e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return FP_ZERO;
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) begin
      mr = {1'b0, p[46:24]}; g = p[23]; st = |p[22:0]; e = e + 1;
    end else begin
      mr = {1'b0, p[45:23]}; g = p[22]; st = |p[21:0];
    end
    if (g && (st || mr[0])) mr = mr + 24'd1;
    if (mr[23]) e = e + 1;       // mantissa rolled over to 2.0
    return fp_pack(s, e, mr[22:0]);
  endfunction

  function automatic fp32_t fp_add(input fp32_t a, input fp32_t b);
    fp32_t       x, y;
    logic [26:0] mx, my, yfull;
    logic [27:0] sum;
    logic [23:0] mr;
    logic        g, rs, st;
    logic [4:0]  lz;
    int          d, e;
    if (a[30:23] == 8'd0) a = FP_ZERO;
    if (b[30:23] == 8'd0) b = FP_ZERO;
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else begin x = b; y = a; end
    if (y[30:0] == 31'd0) return (x[30:0] == 31'd0) ? FP_ZERO : x;
    e  = int'(x[30:23]);
    d  = int'(x[30:23]) - int'(y[30:23]);
    mx = {1'b1, x[22:0], 3'b000};
    yfull = {1'b1, y[22:0], 3'b000};
    if (d > 26) begin
      my = 27'd1;
    end else begin
      my = yfull >> d;
      st = |(yfull & ((27'd1 << d) - 27'd1));
      my[0] = my[0] | st;
    end
    if (x[31] == y[31]) sum = {1'b0, mx} + {1'b0, my};
    else                sum = {1'b0, mx} - {1'b0, my};
    if (sum == 28'd0) return FP_ZERO;
    if (sum[27]) begin
      st  = sum[0];
      sum = sum >> 1;
      sum[0] = sum[0] | st;
      e = e + 1;
    end else begin
      // leading-zero count of sum[26:0], then one shift
      lz = 5'd0;
      for (int i = 0; i < 27; i++) if (sum[i]) lz = 5'(26 - i);
      sum = sum << lz;
      e = e - int'(lz);
    end
    mr = {1'b0, sum[25:3]};
    g  = sum[2];
    rs = sum[1] | sum[0];
    if (g && (rs || mr[0])) mr = mr + 24'd1;
    if (mr[23]) e = e + 1;
    return fp_pack(x[31], e, mr[22:0]);
  endfunction

  function automatic fp32_t fp_sub(input fp32_t a, input fp32_t b);
    return fp_add(a, {~b[31], b[30:0]});
  endfunction

  function automatic fp32_t fp_abs(input fp32_t a);
    return {1'b0, a[30:0]};
  endfunction

  // a * 2^-j, exact unless the result leaves the normal range.
  function automatic fp32_t fp_scale2n(input fp32_t a, input int j);
    int e;
    if (a[30:23] == 8'd0) return FP_ZERO;
    e = int'(a[30:23]) - j;
    return fp_pack(a[31], e, a[22:0]);
  endfunction

  // Strictly positive (a flushed subnormal counts as zero).
  function automatic logic fp_gt0(input fp32_t a);
    return !a[31] && (a[30:23] != 8'd0);
  endfunction

  // Initial estimate of 1/sqrt(a) from the bit pattern (a > 0).
  function automatic fp32_t fp_rsqrt_seed(input fp32_t a);
    return 32'h5f37_59df - {1'b0, a[31:1]};
  endfunction

  // One Newton step for 1/sqrt(a): y * (1.5 - (a/2) * y * y).
  function automatic fp32_t fp_rsqrt_step(input fp32_t a, input fp32_t y);
    fp32_t h, t;
    h = fp_scale2n(a, 1);
    t = fp_mul(y, y);
    t = fp_mul(h, t);
    t = fp_sub(FP_1P5, t);
    return fp_mul(y, t);
  endfunction
endpackage
