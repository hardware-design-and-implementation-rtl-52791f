// fp32_pkg: single-precision (IEEE 754 binary32) arithmetic used by the
// front end of the reconciliation sender (normalization, data mapping and
// LLR initialization all work on 32-bit floating point).
//
// Each operator is a combinational function, so a caller places a register
// after it to get one pipeline stage per operation. The functions are a
// reduced IEEE implementation chosen for this design:
//   * subnormal inputs are read as zero and subnormal results flush to zero;
//   * results are truncated (rounded toward zero), so they may differ from a
//     round-to-nearest unit by one unit in the last place;
//   * overflow returns infinity; NaN is not produced or recognised.
// fp_to_fix converts to a signed fixed-point integer with saturation.
package fp32_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3F80_0000;
  localparam fp32_t FP_INF  = 32'h7F80_0000;

  function automatic logic fp_is_zero(fp32_t a);
    return a[30:23] == 8'd0;
  endfunction

  // Pack sign, biased exponent (may be out of range) and 23-bit fraction.
  function automatic fp32_t fp_pack(logic s, int e, logic [22:0] f);
    if (e <= 0)   return {s, 31'd0};
    if (e >= 255) return {s, FP_INF[30:0]};
    return {s, 8'(e), f};
  endfunction

  function automatic fp32_t fp_neg(fp32_t a);
    return {~a[31], a[30:0]};
  endfunction

  function automatic fp32_t fp_mul(fp32_t a, fp32_t b);
    logic        s;
    logic [47:0] p;
    int          e;
    s = a[31] ^ b[31];
    if (fp_is_zero(a) || fp_is_zero(b)) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) return fp_pack(s, e + 1, p[46:24]);
    return fp_pack(s, e, p[45:23]);
  endfunction

  function automatic fp32_t fp_add(fp32_t a, fp32_t b);
    fp32_t       big, sml;
    logic [27:0] mb, ms, r;   // 1 carry + 1 hidden + 23 fraction + 3 guard bits
    int          d, e, lz;
    if (fp_is_zero(a)) return b;
    if (fp_is_zero(b)) return a;
    if (a[30:0] >= b[30:0]) begin big = a; sml = b; end
    else                    begin big = b; sml = a; end
    d  = int'(big[30:23]) - int'(sml[30:23]);
    mb = {2'b01, big[22:0], 3'b000};
    ms = {2'b01, sml[22:0], 3'b000};
    ms = (d > 27) ? 28'd0 : (ms >> d);
    e  = int'(big[30:23]);
    if (big[31] == sml[31]) begin
      r = mb + ms;
      if (r[27]) begin
        r = r >> 1;
        e = e + 1;
      end
    end else begin
      r = mb - ms;
      if (r == 28'd0) return FP_ZERO;
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (r[i]) break;
        lz++;
      end
      r = r << lz;
      e = e - lz;
    end
    return fp_pack(big[31], e, r[25:3]);
  endfunction

  function automatic fp32_t fp_sub(fp32_t a, fp32_t b);
    return fp_add(a, fp_neg(b));
  endfunction

  function automatic fp32_t fp_div(fp32_t a, fp32_t b);
    logic        s;
    logic [47:0] q;
    int          e;
    s = a[31] ^ b[31];
    if (fp_is_zero(b)) return {s, FP_INF[30:0]};
    if (fp_is_zero(a)) return {s, 31'd0};
    q = {1'b1, a[22:0], 24'd0} / {24'd0, 1'b1, b[22:0]};
    e = int'(a[30:23]) - int'(b[30:23]) + 127;
    if (q[24]) return fp_pack(s, e, q[23:1]);
    return fp_pack(s, e - 1, q[22:0]);
  endfunction

  // Square root of |a| (the sign bit is ignored).
  function automatic fp32_t fp_sqrt(fp32_t a);
    int          eu, er;
    logic [47:0] rad;
    logic [49:0] rem;
    logic [23:0] root;
    if (fp_is_zero(a)) return FP_ZERO;
    eu = int'(a[30:23]) - 127;
    if (eu[0]) rad = {1'b1, a[22:0], 24'd0};
    else       rad = {1'b0, 1'b1, a[22:0], 23'd0};
    er = eu >>> 1;
    // Digit-by-digit (restoring) integer square root, two radicand bits per step.
    rem  = '0;
    root = '0;
    for (int i = 23; i >= 0; i--) begin
      logic [49:0] trial;
      rem   = {rem[47:0], rad[2*i+1 -: 2]};
      trial = {24'd0, root, 2'b01};
      if (rem >= trial) begin
        rem  = rem - trial;
        root = {root[22:0], 1'b1};
      end else begin
        root = {root[22:0], 1'b0};
      end
    end
    return fp_pack(1'b0, er + 127, root[22:0]);
  endfunction

  // a * 2^frac, truncated toward zero, saturated to +/-(2^(w-1)-1); w <= 31.
  function automatic logic signed [31:0] fp_to_fix(fp32_t a, int frac, int w);
    int          sh;
    logic [62:0] m;
    logic [31:0] lim, mag;
    lim = (32'd1 << (w - 1)) - 32'd1;
    if (fp_is_zero(a)) return '0;
    sh = int'(a[30:23]) - 127 - 23 + frac;
    if (sh >= 8) begin
      mag = lim;                    // |a| * 2^frac >= 2^31: saturate
    end else begin
      m = {39'd0, 1'b1, a[22:0]};
      if (sh >= 0) m = m << sh;
      else if (sh < -24) m = '0;
      else m = m >> (-sh);
      mag = (m > 63'(lim)) ? lim : m[31:0];
    end
    return a[31] ? -$signed(mag) : $signed(mag);
  endfunction

endpackage
