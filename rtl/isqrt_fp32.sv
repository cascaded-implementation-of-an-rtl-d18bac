// isqrt_fp32: single-precision inverse square root, y = 1/sqrt(v).
//
// The operand is split into an exponent path and a mantissa path that run side
// by side. The mantissa path turns the problem into fixed point: e0 m22..m16
// address the seed table (x0 and x0^2); the denormalizing shifter forms the
// truncated operand b1 (0.1 m22..m9, shifted right once for odd exponents); the
// first stage makes the reduced-precision iteration x1; the second stage makes
// the full-precision iteration with the full operand b2 and rounds to 23
// fraction bits. The exponent path computes the result exponent from e alone,
// with the overflow lookahead supplying the one case (mantissa exactly 1/4
// after denormalization) in which the result mantissa reaches 2.0 and the
// exponent must be one higher. The structure follows the method throughout;
// the rounding and the second-stage widths are this implementation's choice.
//
// Interface: v in, y out (sign 0), ovf out (overflow lookahead fired).
// Purely combinational, no clock and no latency: the method describes a
// cascade of logic, not a pipeline. Operands are assumed positive and normal;
// zero, negative numbers, subnormals, infinities and NaNs are not treated.
module isqrt_fp32
  import isqrt_pkg::*;
(
  input  fp32_t v,
  output fp32_t y,
  output logic  ovf
);

  logic               e0;
  logic [X0_W-1:0]    x0;
  logic [Q_W-1:0]     q;
  logic [B1_W-1:0]    b1;
  logic [B2_W-1:0]    b2;
  logic [FAC_W-1:0]   fac;
  logic [X1_W-1:0]    x1;
  logic [X2_W-1:0]    x2;
  logic [MANT_W-1:0]  mant;
  logic               mant_ge2;
  logic [EXP_W-1:0]   exp_r;

  assign e0 = v.exp[0];

  // ---- mantissa path -----------------------------------------------------------
  isqrt_rom u_rom (
    .addr ({e0, v.mant[MANT_W-1 -: ROM_AW-1]}),
    .x0   (x0),
    .q    (q)
  );

  denorm_shifter u_shift (
    .e0   (e0),
    .m_hi (v.mant[MANT_W-1 -: 14]),
    .b1   (b1)
  );

  isqrt_stage1 u_stage1 (
    .b1  (b1),
    .q   (q),
    .x0  (x0),
    .fac (fac),
    .x1  (x1)
  );

  // full operand b = 0.1 m22..m0 (even exponent) or 0.01 m22..m0 (odd)
  assign b2 = e0 ? {1'b0, 1'b1, v.mant} : {1'b1, v.mant, 1'b0};

  isqrt_stage2 u_stage2 (
    .x1       (x1),
    .b2       (b2),
    .x2       (x2),
    .mant     (mant),
    .mant_ge2 (mant_ge2)
  );

  // ---- exponent path -----------------------------------------------------------
  overflow_lookahead u_ovf (
    .e0  (e0),
    .m   (v.mant),
    .ovf (ovf)
  );

  exponent_unit u_exp (
    .e   (v.exp),
    .ovf (ovf),
    .s   (exp_r)
  );

  assign y = '{sign: 1'b0, exp: exp_r, mant: mant};

endmodule
