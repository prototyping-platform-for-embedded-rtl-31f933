// nssd_pkg: constants, types and single-precision arithmetic shared by the
// NSSD patch-search accelerator.
//
// The accelerator compares an 11x11 reference image patch with every 11x11
// window of a search region using the Normalised Sum of Squared Differences
// (NSSD).  Pixels are 8-bit grey levels, the five running sums are integers
// and everything after the sums is IEEE-754 single precision, as in the
// kernel this design follows.
//
// The float functions below are small combinational helpers used inside
// pipeline stages.  They handle normal numbers and zero only: subnormal
// results flush to zero, subnormal inputs are read as zero, overflow gives
// +/-infinity, and every result is truncated (round toward zero).  The
// original kernel was built with relaxed floating-point options that also
// drop intermediate roundings; truncation is this design's own choice.
package nssd_pkg;

  // Side of the square image patch (pixels).
  localparam int unsigned PATCH = 11;
  // Pixels per patch, n in the NSSD formula.
  localparam int unsigned NPIX = PATCH * PATCH;

  typedef logic [7:0]  pixel_t;
  typedef logic [31:0] fp32_t;

  // Widths of the integer sums for an 11x11 patch of 8-bit pixels:
  // 121*255 < 2^15, 121*255*255 < 2^23.
  localparam int unsigned SUM1_W = 15;
  localparam int unsigned SUM2_W = 23;

  typedef struct packed {
    logic [SUM1_W-1:0] sf;   // sum of reference pixels
    logic [SUM1_W-1:0] st;   // sum of candidate pixels
    logic [SUM2_W-1:0] sf2;  // sum of squared reference pixels
    logic [SUM2_W-1:0] st2;  // sum of squared candidate pixels
    logic [SUM2_W-1:0] sft;  // sum of products
  } sums_t;

  // Coordinates of a candidate window (top-left pixel) inside the region.
  localparam int unsigned COORD_W = 16;
  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    fp32_t  nssd;
    coord_t u;
    coord_t v;
  } match_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3F80_0000;
  localparam fp32_t FP_TWO  = 32'h4000_0000;
  localparam fp32_t FP_PINF = 32'h7F80_0000;

  // --------------------------------------------------------------------
  // Unsigned 32-bit integer to float.
  function automatic fp32_t fp_from_uint(input logic [31:0] x);
    int          lz;
    logic [31:0] m;
    lz = 32;
    for (int i = 0; i < 32; i++) if (x[i]) lz = 31 - i;
    if (x == 32'd0) return FP_ZERO;
    m = x << lz;  // leading one now at bit 31
    return {1'b0, 8'(127 + 31 - lz), m[30:8]};
  endfunction

  // Build a float from sign, unbiased exponent and a mantissa whose
  // leading one sits at bit 23 (value = mant/2^23 * 2^e).
  function automatic fp32_t fp_pack(input logic s, input int e, input logic [23:0] mant);
    if (mant == 24'd0 || e < -126) return FP_ZERO;
    if (e > 127) return {s, FP_PINF[30:0]};
    return {s, 8'(e + 127), mant[22:0]};
  endfunction

  function automatic fp32_t fp_mul(input fp32_t a, input fp32_t b);
    logic        s;
    int          e;
    logic [47:0] p;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return FP_ZERO;
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 254;
    if (p[47]) return fp_pack(s, e + 1, p[47:24]);
    return fp_pack(s, e, p[46:23]);
  endfunction

  // a + b for signed operands.
  function automatic fp32_t fp_add(input fp32_t a, input fp32_t b);
    fp32_t       x, y;
    int          ex, ey, sh, lz;
    logic [26:0] mx, my, r;   // 1.23 mantissa plus 3 guard bits
    logic [27:0] sum;
    if (a[30:23] == 8'd0) return (b[30:23] == 8'd0) ? FP_ZERO : b;
    if (b[30:23] == 8'd0) return a;
    // order by magnitude: x is the larger
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else                    begin x = b; y = a; end
    ex = int'(x[30:23]);
    ey = int'(y[30:23]);
    sh = ex - ey;
    mx = {1'b1, x[22:0], 3'b000};
    my = {1'b1, y[22:0], 3'b000};
    my = (sh > 26) ? 27'd0 : (my >> sh);
    if (x[31] == y[31]) begin
      sum = {1'b0, mx} + {1'b0, my};
      if (sum[27]) return fp_pack(x[31], ex - 127 + 1, sum[27:4]);
      return fp_pack(x[31], ex - 127, sum[26:3]);
    end
    r = mx - my;
    if (r == 27'd0) return FP_ZERO;
    lz = 27;
    for (int i = 0; i < 27; i++) if (r[i]) lz = 26 - i;
    r = r << lz;
    return fp_pack(x[31], ex - 127 - lz, r[26:3]);
  endfunction

  function automatic fp32_t fp_sub(input fp32_t a, input fp32_t b);
    return fp_add(a, {~b[31], b[30:0]});
  endfunction

  // a / b; division by zero gives a signed infinity.
  function automatic fp32_t fp_div(input fp32_t a, input fp32_t b);
    logic        s;
    int          e;
    logic [47:0] q;
    s = a[31] ^ b[31];
    if (b[30:23] == 8'd0) return {s, FP_PINF[30:0]};
    if (a[30:23] == 8'd0) return FP_ZERO;
    q = {1'b1, a[22:0], 24'd0} / {24'd0, 1'b1, b[22:0]};
    e = int'(a[30:23]) - int'(b[30:23]);
    if (q[24]) return fp_pack(s, e, q[24:1]);
    return fp_pack(s, e - 1, q[23:0]);
  endfunction

  // Square root; zero and negative inputs give zero.
  function automatic fp32_t fp_sqrt(input fp32_t a);
    int          e;
    logic [49:0] m;     // radicand, mantissa scaled by 2^23 (and 2 if odd)
    logic [24:0] root;
    logic [49:0] trial;
    if (a[31] || a[30:23] == 8'd0) return FP_ZERO;
    e = int'(a[30:23]) - 127;
    m = {26'd0, 1'b1, a[22:0]} << 23;
    if (e % 2 != 0) begin
      m = m << 1;
      e = e - 1;
    end
    // bitwise integer square root of m (< 2^49), result < 2^25
    root = 25'd0;
    for (int i = 24; i >= 0; i--) begin
      trial = {25'd0, root | (25'd1 << i)};
      if (trial * trial <= m) root = root | (25'd1 << i);
    end
    return fp_pack(1'b0, e / 2, root[23:0]);
  endfunction

  // a < b for signed floats (no NaN handling).
  function automatic logic fp_lt(input fp32_t a, input fp32_t b);
    logic az, bz;
    az = (a[30:23] == 8'd0);
    bz = (b[30:23] == 8'd0);
    if (az && bz) return 1'b0;
    if (az) return ~b[31];
    if (bz) return a[31];
    if (a[31] != b[31]) return a[31];
    if (a[31]) return a[30:0] > b[30:0];
    return a[30:0] < b[30:0];
  endfunction

endpackage
