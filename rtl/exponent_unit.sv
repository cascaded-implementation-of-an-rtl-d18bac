// exponent_unit: exponent of 1/sqrt(v), computed beside the mantissa datapath.
//
// For an operand exponent e (bias 127) the result exponent is (380 - e)/2 when e
// is even and (379 - e)/2 when e is odd, plus 1 when the mantissa overflows to
// 2.0. Both reduce to one sum without any adder for e itself:
//     s = (~e >> 1) + 62 + c,   c = ~e0 | ovf
// The inverted and shifted exponent bits ~e7..~e1 enter a ripple of seven
// bit slices, each of which adds one bit of the constant 62 (0111110) to one
// operand bit; the carry into the lowest slice merges the even/odd choice with
// the overflow bit, which is possible because an overflow only happens for an
// odd exponent. The carry out of the top slice is s7. The equations, the
// inverted-and-shifted form and the merged carry follow the method; the slice
// logic is written as sum/carry equations rather than as a given gate netlist.
//
// Interface: e (8 bits) and ovf in, s (8 bits) out. Combinational. Only
// exponents of normal numbers (1..254) give meaningful results.
module exponent_unit
  import isqrt_pkg::*;
(
  input  logic [EXP_W-1:0] e,
  input  logic             ovf,
  output logic [EXP_W-1:0] s
);

  localparam logic [EXP_W-2:0] K = 7'd62;  // constant added to the shifted ~e

  logic [EXP_W-2:0] a;       // ~e7..~e1
  logic [EXP_W-1:0] c;       // carries, c[0] = carry into the lowest slice

  assign a    = ~e[EXP_W-1:1];
  assign c[0] = ~e[0] | ovf;

  for (genvar i = 0; i < EXP_W - 1; i++) begin : g_slice
    if (K[i]) begin : g_one      // slice adding a 1
      assign s[i]   = ~(a[i] ^ c[i]);
      assign c[i+1] = a[i] | c[i];
    end else begin : g_zero      // slice adding a 0
      assign s[i]   = a[i] ^ c[i];
      assign c[i+1] = a[i] & c[i];
    end
  end

  assign s[EXP_W-1] = c[EXP_W-1];

endmodule
