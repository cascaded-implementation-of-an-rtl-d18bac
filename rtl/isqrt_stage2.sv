// isqrt_stage2: second, full-precision iteration x2 = x1 + x1*(1 - b*x1^2)/2.
//
// After the first stage b*x1^2 is within about 2^-10 of 1, so the adjusting
// factor 3/2 - b*x1^2/2 is 1 + delta with a tiny delta and the result is formed
// as x1 + delta*x1: the "middle" of the computation, the run of identical bits
// between the leading 1 and the significant part of delta, is never computed.
//   1. A squaring array multiplier forms x1^2 (kept to 2.30).
//   2. An array multiplier multiplies the full, untruncated operand b (0.25) by it
//      (kept to 2.34).
//   3. Only the bottom part of b*x1^2, the 26 bits of weight 2^-9 .. 2^-34, is
//      kept; read as a two's-complement number it is b*x1^2 - 1. Its bits are
//      inverted (ones' complement) to give 1 - b*x1^2 = 2*delta.
//   4. A signed array multiplier forms 2*delta*x1; dropping one more bit halves it.
//   5. x1 + delta*x1 is added in 2.30 and rounded to 23 fraction bits by adding
//      half an LSB and truncating.
// The method lets delta have one known sign; this implementation keeps delta
// signed, because a truncated seed square can leave x1 slightly above 1/sqrt(b),
// as in the worked examples. A result that rounds to 2.0 (only for b = 1/4)
// leaves the 23 fraction bits at zero by itself; the exponent is corrected by the
// overflow lookahead, so no mantissa correction logic exists. The widths of
// steps 1-5 are this implementation's choice.
//
// Interface: x1 (2.23) and b2 (0.25) in; the rounded fraction, the carry into the
// 2^1 position (never used by the datapath, brought out for checking) and the
// unrounded x2 (2.30) out. Combinational.
module isqrt_stage2
  import isqrt_pkg::*;
(
  input  logic [X1_W-1:0]   x1,        // first-stage result, 2.23
  input  logic [B2_W-1:0]   b2,        // full operand b, 0.25
  output logic [X2_W-1:0]   x2,        // x1 + delta*x1 before rounding, 2.30
  output logic [MANT_W-1:0] mant,      // final fraction bits m22..m0
  output logic              mant_ge2   // rounded result reached 2.0
);

  localparam int unsigned SQP_W = 2 * X1_W;          // 50, 4.46
  localparam int unsigned BXP_W = B2_W + SQ_W;       // 57, 2.55
  localparam int unsigned DXP_W = BOT_W + X1_W;      // 51, signed, scaled 2^-57
  localparam int unsigned DX_SH = (BX_FRAC + X1_FRAC + 1) - X2_FRAC;  // 28
  localparam int unsigned DX_W  = DXP_W - DX_SH;     // 23

  logic [SQP_W-1:0] sq_full;
  logic [SQ_W-1:0]  sq;
  logic [BXP_W-1:0] bx_full;
  logic [BX_W-1:0]  bx;
  logic [BOT_W-1:0] two_delta;
  logic [DXP_W-1:0] dx_full;
  logic [DX_W-1:0]  dx;
  logic [X2_W-1:0]  x2_r;

  // 1. x1^2, truncated to 30 fraction bits
  array_mult #(.A_W(X1_W), .B_W(X1_W)) u_mul_sq (
    .a(x1), .b(x1), .p(sq_full)
  );
  assign sq = sq_full[2*X1_FRAC - SQ_FRAC +: SQ_W];

  // 2. b * x1^2, truncated to 34 fraction bits
  array_mult #(.A_W(SQ_W), .B_W(B2_W)) u_mul_bsq (
    .a(sq), .b(b2), .p(bx_full)
  );
  assign bx = bx_full[(B2_W + SQ_FRAC) - BX_FRAC +: BX_W];

  // 3. bottom part, inverted: 1 - b*x1^2 in two's complement, scaled 2^-34
  assign two_delta = ~bx[BOT_W-1:0];

  // 4. 2*delta*x1, then halve and bring to 30 fraction bits (arithmetic shift)
  array_mult #(.A_W(BOT_W), .B_W(X1_W), .A_SIGNED(1'b1)) u_mul_dx (
    .a(two_delta), .b(x1), .p(dx_full)
  );
  assign dx = dx_full[DXP_W-1 -: DX_W];

  // 5. x1 + delta*x1, then round to nearest (ties up) at 23 fraction bits
  assign x2       = {x1, (X2_FRAC - X1_FRAC)'(0)} + {{(X2_W-DX_W){dx[DX_W-1]}}, dx};
  assign x2_r     = x2 + (X2_W'(1) << (X2_FRAC - MANT_W - 1));
  assign mant     = x2_r[X2_FRAC-1 -: MANT_W];
  assign mant_ge2 = x2_r[X2_W-1];

endmodule
