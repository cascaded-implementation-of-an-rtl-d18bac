// overflow_lookahead: early detection of the one mantissa overflow.
//
// The result mantissa reaches 2.0 only when the denormalized operand mantissa is
// exactly 1/4, i.e. the exponent LSB e0 is 1 and all 23 fraction bits are 0. This
// is a 24-input AND of e0 and the inverted fraction bits. Rather than one wide
// gate it is a tree of small gates, whose delay is hidden behind the much longer
// mantissa datapath: six 4-input NORs over {~e0, m22..m0}, two 3-input ANDs and a
// final 2-input AND. The tree shape is this implementation's choice; the method
// only asks for cascaded smaller gates.
//
// Interface: e0 and m22..m0 in, ovf out. Combinational.
module overflow_lookahead
  import isqrt_pkg::*;
(
  input  logic              e0,
  input  logic [MANT_W-1:0] m,
  output logic              ovf
);

  logic [23:0] in_bits;   // a 1 on any of these rules the overflow out
  logic [5:0]  nor4;
  logic [1:0]  and3;

  assign in_bits = {~e0, m};

  for (genvar g = 0; g < 6; g++) begin : g_nor
    assign nor4[g] = ~(in_bits[4*g] | in_bits[4*g+1] | in_bits[4*g+2] | in_bits[4*g+3]);
  end

  assign and3[0] = nor4[0] & nor4[1] & nor4[2];
  assign and3[1] = nor4[3] & nor4[4] & nor4[5];
  assign ovf     = and3[0] & and3[1];

endmodule
