// fp32_pkg: shared types and constants for the IEEE-754 single-precision
// (binary32) arithmetic used throughout the design.
//
// All arithmetic units in this design use the 32-bit IEEE format: 1 sign bit,
// 8 exponent bits (bias 127) and 23 fraction bits. As a design choice,
// subnormal numbers are flushed to zero on input and on output, and every
// NaN result is the canonical quiet NaN 32'h7FC0_0000. Rounding is
// round-to-nearest-even.
package fp32_pkg;

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] man;
  } fp32_t;

  localparam logic [31:0] FP32_POS_ZERO = 32'h0000_0000;
  localparam logic [31:0] FP32_QNAN     = 32'h7FC0_0000;
  localparam logic [7:0]  FP32_EXP_MAX  = 8'hFF;
  localparam int unsigned FP32_BIAS     = 127;

  function automatic logic fp32_is_nan(fp32_t v);
    return (v.exp == FP32_EXP_MAX) && (v.man != '0);
  endfunction

  function automatic logic fp32_is_inf(fp32_t v);
    return (v.exp == FP32_EXP_MAX) && (v.man == '0);
  endfunction

  // Zero or subnormal: both are treated as zero (flush-to-zero).
  function automatic logic fp32_is_zero(fp32_t v);
    return v.exp == '0;
  endfunction

  function automatic fp32_t fp32_inf(logic sign);
    return '{sign: sign, exp: FP32_EXP_MAX, man: '0};
  endfunction

  function automatic fp32_t fp32_zero(logic sign);
    return '{sign: sign, exp: '0, man: '0};
  endfunction

endpackage
