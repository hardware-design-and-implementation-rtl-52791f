// tb_fp_pkg: reference conversions between IEEE binary32 bit patterns and
// real, written independently of the design's fp32 operators, plus a
// relative-error comparison used by the testbenches.
package tb_fp_pkg;

  function automatic real f2r(logic [31:0] a);
    real m;
    if (a[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(a[22:0]) / 8388608.0;
    m = m * $pow(2.0, real'(int'(a[30:23]) - 127));
    return a[31] ? -m : m;
  endfunction

  function automatic logic [31:0] r2f(real x);
    logic s;
    int   e;
    real  m;
    if (x == 0.0) return 32'd0;
    s = (x < 0.0);
    m = s ? -x : x;
    e = 0;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0)  begin m = m * 2.0; e--; end
    return {s, 8'(e + 127), 23'($rtoi((m - 1.0) * 8388608.0))};
  endfunction

  // |got - exp| <= rel * |exp| + abs_tol
  function automatic bit close(real got, real expv, real rel, real abs_tol);
    real d, r;
    d = got - expv; if (d < 0.0) d = -d;
    r = expv;       if (r < 0.0) r = -r;
    return d <= rel * r + abs_tol;
  endfunction

  // standard normal sample (Box-Muller)
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(32'hFFFF_FFFE)) + 1.0) / 4294967296.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

endpackage
