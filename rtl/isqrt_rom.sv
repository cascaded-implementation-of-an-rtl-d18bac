// isqrt_rom: seed table of the inverse-square-root datapath.
//
// A 256-word read-only table addressed by {e0, m22..m16}, the exponent LSB and
// the seven leading fraction bits of the operand. Each word holds the seed x0 =
// 1/sqrt(b) of the address range (9 bits, format 1.8, the leading 1 included)
// next to its square x0^2 (12 bits, format 2.10), so that the first stage needs
// no squaring multiplier. The seed is taken for the largest b of the range and
// truncated, and its square is truncated again, which keeps b*x0^2 below 1 for
// every operand of the range (the "negative error" seed). The sizes, the address
// and the truncation rules follow the method; the table contents are generated
// at elaboration from the formula in isqrt_pkg::seed_x0 rather than listed.
//
// Interface: addr in, x0 and q out. Purely combinational, no clock.
module isqrt_rom
  import isqrt_pkg::*;
(
  input  logic [ROM_AW-1:0] addr,  // {e0, m22..m16}
  output logic [X0_W-1:0]   x0,    // seed, 1.8
  output logic [Q_W-1:0]    q      // seed squared, 2.10
);

  logic [X0_W+Q_W-1:0] rom [ROM_N];

  for (genvar i = 0; i < ROM_N; i++) begin : g_word
    localparam logic [X0_W-1:0] X = seed_x0(ROM_AW'(i));
    localparam logic [Q_W-1:0]  Q = seed_q(X);
    assign rom[i] = {X, Q};
  end

  assign {x0, q} = rom[addr];

endmodule
