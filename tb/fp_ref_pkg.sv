// fp_ref_pkg: reference arithmetic for the testbenches.
//
// Computes single-precision results through the simulator's double-precision
// `real` type and an explicit round-to-nearest-even conversion, so the
// expected values do not depend on the RTL. The sum or product of two
// binary32 numbers is exact in binary64 (or, for sums of widely different
// magnitudes, cannot land on a binary32 rounding tie), so a single rounding
// step gives the correctly rounded binary32 result. The conventions of the
// RTL are mirrored: subnormals read and written as zero, one canonical NaN.
package fp_ref_pkg;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  function automatic logic is_nan(logic [31:0] v);
    return v[30:23] == 8'hFF && v[22:0] != 0;
  endfunction

  function automatic logic is_inf(logic [31:0] v);
    return v[30:23] == 8'hFF && v[22:0] == 0;
  endfunction

  function automatic logic is_zero(logic [31:0] v);
    return v[30:23] == 8'h00;
  endfunction

  function automatic real to_real(logic [31:0] v);
    logic [10:0] e;
    if (is_zero(v)) return $bitstoreal({v[31], 63'd0});
    e = 11'(int'(v[30:23]) - 127 + 1023);
    return $bitstoreal({v[31], e, v[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] from_real(real r);
    logic [63:0] d;
    logic [24:0] m;
    int          e;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:0] == 0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    e = e + 127;
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] add(logic [31:0] a, logic [31:0] b_in, logic sub);
    logic [31:0] b;
    b = b_in;
    b[31] = b_in[31] ^ sub;
    if (is_nan(a) || is_nan(b)) return QNAN;
    if (is_inf(a) && is_inf(b)) return (a[31] != b[31]) ? QNAN : a;
    if (is_inf(a)) return a;
    if (is_inf(b)) return b;
    if (is_zero(a) && is_zero(b)) return {a[31] & b[31], 31'd0};
    return from_real(to_real(a) + to_real(b));
  endfunction

  function automatic logic [31:0] mul(logic [31:0] a, logic [31:0] b);
    logic s;
    s = a[31] ^ b[31];
    if (is_nan(a) || is_nan(b)) return QNAN;
    if ((is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b))) return QNAN;
    if (is_inf(a) || is_inf(b)) return {s, 8'hFF, 23'd0};
    if (is_zero(a) || is_zero(b)) return {s, 31'd0};
    return from_real(to_real(a) * to_real(b));
  endfunction

  // a * 2**k for the power-of-two coefficient unit.
  function automatic logic [31:0] scale(logic [31:0] a, int k);
    if (is_nan(a)) return QNAN;
    if (is_inf(a)) return a;
    if (is_zero(a)) return {a[31], 31'd0};
    return from_real(to_real(a) * (2.0 ** k));
  endfunction

  // Yee-cell updates of a 2-D TMz FDTD step with power-of-two coefficients
  // c_h = 2**chk and c_e = 2**cek, in the operation order of the RTL.
  function automatic logic [31:0] yee_hx(logic [31:0] hx, logic [31:0] ez,
                                         logic [31:0] ez_yp, int chk);
    return add(hx, scale(add(ez_yp, ez, 1'b1), chk), 1'b1);
  endfunction

  function automatic logic [31:0] yee_hy(logic [31:0] hy, logic [31:0] ez,
                                         logic [31:0] ez_xp, int chk);
    return add(hy, scale(add(ez_xp, ez, 1'b1), chk), 1'b0);
  endfunction

  function automatic logic [31:0] yee_ez(logic [31:0] ez, logic [31:0] hx, logic [31:0] hy,
                                         logic [31:0] hx_ym, logic [31:0] hy_xm, int cek);
    return add(ez, scale(add(add(hy, hy_xm, 1'b1), add(hx, hx_ym, 1'b1), 1'b1), cek), 1'b0);
  endfunction

  // Random normal number with a biased exponent in [emin, emax].
  function automatic logic [31:0] rand_fp(int emin, int emax);
    int e;
    e = emin + int'($urandom_range(emax - emin));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

endpackage
