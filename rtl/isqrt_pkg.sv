// isqrt_pkg: widths, number formats and the seed-table formula shared by the
// cascaded inverse-square-root datapath.
//
// All mantissa quantities are unsigned fixed-point numbers; the comment next to
// each width gives the format as <integer bits>.<fraction bits>. The first-stage
// widths (9-bit seed, 12-bit square, 15-bit b, 15x12 and 16x9 products, 14 kept
// product bits) are the ones the method prescribes. The second-stage widths
// (32-bit square, 36-bit b*x^2, 26-bit bottom part, 30 fraction bits for x+dx)
// are this implementation's choice: enough guard bits that the second stage adds
// no error that matters next to the final rounding to 23 fraction bits.
package isqrt_pkg;

  // ---- IEEE-754 single precision -------------------------------------------
  localparam int unsigned EXP_W  = 8;
  localparam int unsigned MANT_W = 23;

  typedef struct packed {
    logic                  sign;
    logic [EXP_W-1:0]      exp;
    logic [MANT_W-1:0]     mant;
  } fp32_t;

  // ---- seed table ------------------------------------------------------------
  localparam int unsigned ROM_AW  = 8;   // address e0 m22..m16
  localparam int unsigned ROM_N   = 1 << ROM_AW;
  localparam int unsigned X0_W    = 9;   // seed x0, 1.8
  localparam int unsigned X0_FRAC = 8;
  localparam int unsigned Q_W     = 12;  // x0^2, 2.10
  localparam int unsigned Q_FRAC  = 10;

  // ---- first stage -----------------------------------------------------------
  localparam int unsigned B1_W    = 15;  // truncated b, 0.15
  localparam int unsigned P1_W    = B1_W + Q_W;        // 27-bit product b*x0^2, 2.25
  localparam int unsigned P1_FRAC = 25;
  localparam int unsigned KEEP_W  = 14;  // product bits p1..p14 that are kept
  localparam int unsigned FAC_W   = 16;  // adjusting factor 1.0 ~p1..~p14, 1.15
  localparam int unsigned X1_W    = FAC_W + X0_W;      // 25-bit x1, 2.23
  localparam int unsigned X1_FRAC = 23;

  // ---- second stage ----------------------------------------------------------
  localparam int unsigned B2_W    = 25;  // full b, 0.25
  localparam int unsigned SQ_W    = 32;  // x1^2 truncated, 2.30
  localparam int unsigned SQ_FRAC = 30;
  localparam int unsigned BX_W    = 36;  // b*x1^2 truncated, 2.34
  localparam int unsigned BX_FRAC = 34;
  localparam int unsigned BOT_W   = 26;  // bottom part of b*x1^2: weights 2^-9 .. 2^-34
  localparam int unsigned X2_FRAC = 30;  // x1 + delta*x1 before rounding, 2.30
  localparam int unsigned X2_W    = 2 + X2_FRAC;

  // Seed for table address {e0, m22..m16}. The operand interval of the entry is
  // b in [lo, hi) with hi = (129 + m)/256 for e0 = 0 and (129 + m)/512 for e0 = 1.
  // The seed is x0 = floor(256/sqrt(hi)) / 256, i.e. the value for the largest b
  // of the interval truncated to 8 fraction bits, so that b*x0^2 < 1 everywhere
  // in the interval. Computed exactly as floor(sqrt(floor(2^(24+e0)/(129+m)))).
  function automatic logic [X0_W-1:0] seed_x0(input logic [ROM_AW-1:0] addr);
    int unsigned n, r;
    n = (32'd1 << (24 + int'(addr[7]))) / (32'd129 + 32'(addr[6:0]));
    r = 0;
    for (int k = 9; k >= 0; k--) begin
      if ((r + (32'd1 << k)) * (r + (32'd1 << k)) <= n) r = r + (32'd1 << k);
    end
    return r[X0_W-1:0];
  endfunction

  // x0^2 truncated from 16 to 10 fraction bits.
  function automatic logic [Q_W-1:0] seed_q(input logic [X0_W-1:0] x0);
    logic [2*X0_W-1:0] sq;
    sq = 18'(x0) * 18'(x0);
    return sq[2*X0_W-1 -: Q_W];
  endfunction

endpackage
