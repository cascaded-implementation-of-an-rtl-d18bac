// isqrt_stage1: first, reduced-precision iteration x1 = x0 * (3/2 - b*x0^2/2).
//
// Only about 13 correct bits are needed from this stage, so its bottom bits are
// removed. A 15x12 array multiplier forms b*x0^2 from the truncated operand b1
// (0.15) and the tabulated square q (2.10). Because the seed is chosen with
// b*x0^2 < 1, the product reads 00.p1 p2 ..., with p1 = 1 for every operand; the
// bits p1..p14 are kept and the rest dropped. Halving and subtracting from 3/2 is
// done by wiring alone: the adjusting factor is 1.0 ~p1 ~p2 .. ~p14 (format 1.15),
// the ones' complement standing in for the exact subtraction (it is at most
// 2^-15 low). A 16x9 array multiplier then multiplies the factor by the seed x0.
// The bit positions and multiplier sizes follow the method; none of the steps
// needs a carry chain other than those inside the two multipliers.
//
// Interface: b1, q, x0 in; x1 (format 2.23, the top bit always 0) and the
// adjusting factor out. Combinational.
module isqrt_stage1
  import isqrt_pkg::*;
(
  input  logic [B1_W-1:0]  b1,    // truncated b, 0.15
  input  logic [Q_W-1:0]   q,     // x0^2 from the table, 2.10
  input  logic [X0_W-1:0]  x0,    // seed, 1.8
  output logic [FAC_W-1:0] fac,   // adjusting factor, 1.15
  output logic [X1_W-1:0]  x1     // first-stage result, 2.23
);

  logic [P1_W-1:0]   p;      // b1*q, 2.25
  logic [KEEP_W-1:0] p_keep; // p1..p14 (weights 2^-1 .. 2^-14)

  array_mult #(.A_W(Q_W), .B_W(B1_W)) u_mul_bq (
    .a(q), .b(b1), .p(p)
  );

  assign p_keep = p[P1_FRAC-1 -: KEEP_W];
  assign fac    = {2'b10, ~p_keep};

  array_mult #(.A_W(X0_W), .B_W(FAC_W)) u_mul_fx (
    .a(x0), .b(fac), .p(x1)
  );

endmodule
