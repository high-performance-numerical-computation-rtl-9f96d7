// fp_mul: pipelined IEEE-754 single-precision multiplier.
//
// Used by the Forward Euler ODE circuit for the products a*y and h*f. The
// product of the two 24-bit significands (hidden bit included) is formed in
// one combinational stage, normalised by at most one position, rounded to
// nearest-even, and then delayed through LATENCY register stages; a new
// operation can be accepted every cycle.
//
// Numeric conventions match fp_add (a design choice): subnormal inputs are
// zero, subnormal results flush to a signed zero, NaN results are the
// canonical quiet NaN, 0 * inf gives NaN, overflow gives a signed infinity.
//
// Timing: in_valid/a/b sampled on a rising edge appear on out_valid/y
// LATENCY edges later. Only out_valid is reset (asynchronous, active low).
module fp_mul
  import fp32_pkg::*;
#(
  parameter int unsigned LATENCY = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t y
);

  if (LATENCY < 1) begin : g_bad_latency
    $error("fp_mul: LATENCY must be at least 1");
  end

  fp32_t res_c;

  always_comb begin : mul_core
    logic        sgn, g, st, rnd;
    logic [47:0] p;
    logic [24:0] m;
    int          e;

    sgn   = a.sign ^ b.sign;
    p     = {1'b1, a.man} * {1'b1, b.man};
    e     = int'(a.exp) + int'(b.exp) - 127;
    m     = '0;
    g     = 1'b0;
    st    = 1'b0;
    rnd   = 1'b0;
    res_c = FP32_POS_ZERO;

    if (fp32_is_nan(a) || fp32_is_nan(b)) begin
      res_c = FP32_QNAN;
    end else if ((fp32_is_inf(a) && fp32_is_zero(b)) || (fp32_is_zero(a) && fp32_is_inf(b))) begin
      res_c = FP32_QNAN;
    end else if (fp32_is_inf(a) || fp32_is_inf(b)) begin
      res_c = fp32_inf(sgn);
    end else if (fp32_is_zero(a) || fp32_is_zero(b)) begin
      res_c = fp32_zero(sgn);
    end else begin
      if (p[47]) begin
        m  = {1'b0, p[47:24]};
        g  = p[23];
        st = |p[22:0];
        e  = e + 1;
      end else begin
        m  = {1'b0, p[46:23]};
        g  = p[22];
        st = |p[21:0];
      end
      rnd = g & (st | m[0]);
      m   = m + {24'd0, rnd};
      if (m[24]) begin
        m = m >> 1;
        e = e + 1;
      end
      if (e >= 255) res_c = fp32_inf(sgn);
      else if (e <= 0) res_c = fp32_zero(sgn);
      else res_c = '{sign: sgn, exp: e[7:0], man: m[22:0]};
    end
  end

  fp32_t pipe_d [LATENCY];
  logic  pipe_v [LATENCY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) pipe_v[i] <= 1'b0;
    end else begin
      pipe_v[0] <= in_valid;
      for (int i = 1; i < LATENCY; i++) pipe_v[i] <= pipe_v[i-1];
    end
  end

  always_ff @(posedge clk) begin
    pipe_d[0] <= res_c;
    for (int i = 1; i < LATENCY; i++) pipe_d[i] <= pipe_d[i-1];
  end

  assign out_valid = pipe_v[LATENCY-1];
  assign y         = pipe_d[LATENCY-1];

endmodule
