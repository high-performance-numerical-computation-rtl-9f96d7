// fp_add: pipelined IEEE-754 single-precision adder / subtractor.
//
// This is the one arithmetic unit each Yee-cell circuit owns; all additions
// and subtractions of a cell update are time-multiplexed onto it. The
// operation y = a + b (sub = 0) or y = a - b (sub = 1) is computed in one
// combinational stage (operand swap, alignment shift with a sticky bit,
// add or subtract, leading-zero normalisation, round-to-nearest-even) and
// then delayed through LATENCY register stages, so one new operation can be
// accepted every cycle and its result appears LATENCY cycles later with
// out_valid.
//
// Numeric conventions (design choices, not fixed by the original design): subnormal
// inputs are read as zero and subnormal results are flushed to a signed
// zero; any NaN result is the canonical quiet NaN; inf - inf gives NaN;
// an exact cancellation gives +0. Overflow gives a signed infinity.
//
// Timing: in_valid/a/b/sub sampled on a rising edge appear on out_valid/y
// LATENCY edges later. Only out_valid is reset (asynchronous, active low).
module fp_add
  import fp32_pkg::*;
#(
  parameter int unsigned LATENCY = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output logic  out_valid,
  output fp32_t y
);

  if (LATENCY < 1) begin : g_bad_latency
    $error("fp_add: LATENCY must be at least 1");
  end

  fp32_t res_c;

  always_comb begin : add_core
    fp32_t       bb, big, sml;
    logic        a_zero, b_zero, eff_sub, a_ge_b;
    logic [7:0]  d;
    logic [26:0] mb, ms, ms_sh, norm;
    logic [27:0] s;
    logic        sticky, g, st, rnd, found;
    logic [24:0] m;
    int          e, lz;

    bb      = b;
    bb.sign = b.sign ^ sub;
    a_zero  = fp32_is_zero(a);
    b_zero  = fp32_is_zero(bb);
    a_ge_b  = {a.exp, a.man} >= {bb.exp, bb.man};
    big     = a_ge_b ? a : bb;
    sml   = a_ge_b ? bb : a;
    eff_sub = a.sign ^ bb.sign;
    d       = big.exp - sml.exp;
    mb      = {1'b1, big.man, 3'b000};
    ms      = {1'b1, sml.man, 3'b000};
    sticky  = 1'b0;
    ms_sh   = '0;
    s       = '0;
    norm    = '0;
    e       = 0;
    lz      = 0;
    m       = '0;
    g       = 1'b0;
    st      = 1'b0;
    rnd     = 1'b0;
    found   = 1'b0;
    res_c   = FP32_POS_ZERO;

    if (fp32_is_nan(a) || fp32_is_nan(bb)) begin
      res_c = FP32_QNAN;
    end else if (fp32_is_inf(a) && fp32_is_inf(bb)) begin
      res_c = eff_sub ? fp32_t'(FP32_QNAN) : a;
    end else if (fp32_is_inf(a)) begin
      res_c = a;
    end else if (fp32_is_inf(bb)) begin
      res_c = bb;
    end else if (a_zero && b_zero) begin
      res_c = fp32_zero(a.sign & bb.sign);
    end else if (a_zero) begin
      res_c = bb;
    end else if (b_zero) begin
      res_c = a;
    end else begin
      // Alignment of the smaller operand, folding shifted-out bits into bit 0.
      if (d >= 8'd27) begin
        ms_sh = {26'd0, 1'b1};
      end else begin
        ms_sh  = ms >> d;
        sticky = |(ms & ((27'd1 << d) - 27'd1));
        ms_sh[0] = ms_sh[0] | sticky;
      end

      if (!eff_sub) begin
        s = {1'b0, mb} + {1'b0, ms_sh};
        if (s[27]) begin
          norm = {s[27:2], s[1] | s[0]};
          e    = int'(big.exp) + 1;
        end else begin
          norm = s[26:0];
          e    = int'(big.exp);
        end
      end else begin
        s = {1'b0, mb} - {1'b0, ms_sh};
        found = 1'b0;
        for (int i = 26; i >= 0; i--) begin
          if (s[i] && !found) begin
            lz    = 26 - i;
            found = 1'b1;
          end
        end
        norm = s[26:0] << lz;
        e    = int'(big.exp) - lz;
      end

      if (s == '0) begin
        res_c = FP32_POS_ZERO;
      end else begin
        g   = norm[2];
        st  = norm[1] | norm[0];
        rnd = g & (st | norm[3]);
        m   = {1'b0, norm[26:3]} + {24'd0, rnd};
        if (m[24]) begin
          m = m >> 1;
          e = e + 1;
        end
        if (e >= 255) res_c = fp32_inf(big.sign);
        else if (e <= 0) res_c = fp32_zero(big.sign);
        else res_c = '{sign: big.sign, exp: e[7:0], man: m[22:0]};
      end
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
