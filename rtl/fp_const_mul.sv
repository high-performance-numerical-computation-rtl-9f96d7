// fp_const_mul: multiply a single-precision number by a power-of-two
// constant, y = a * 2**k, with no clock cycle of delay.
//
// The FDTD update coefficients (time step over permittivity or permeability
// times cell size) are applied by this unit. Restricting each coefficient to
// a power of two makes the multiplication a small exponent addition: purely
// combinational and far smaller than the floating-point adder. That reading
// of a "constant multiplier" that adds no cycles and little area is this
// design's choice.
//
// Interface: a (binary32), k (signed 8-bit shift, per-instance constant),
// y = a * 2**k. Zero and subnormal inputs give a signed zero, inf and NaN
// pass through (NaN made canonical), exponent overflow gives a signed
// infinity and underflow a signed zero.
module fp_const_mul
  import fp32_pkg::*;
(
  input  fp32_t             a,
  input  logic signed [7:0] k,
  output fp32_t             y
);

  always_comb begin
    int e;
    e = int'(a.exp) + int'(k);
    if (fp32_is_nan(a))       y = FP32_QNAN;
    else if (fp32_is_inf(a))  y = a;
    else if (fp32_is_zero(a)) y = fp32_zero(a.sign);
    else if (e >= 255)        y = fp32_inf(a.sign);
    else if (e <= 0)          y = fp32_zero(a.sign);
    else                      y = '{sign: a.sign, exp: e[7:0], man: a.man};
  end

endmodule
