// denorm_shifter: one-bit denormalizing shifter for the first stage.
//
// Builds the truncated first-stage operand b = 0.1 m22..m9 (15 fraction bits)
// from the operand's fraction field. When the exponent LSB e0 is 1 the operand is
// shifted one place to the right, b = 0.01 m22..m10, so that b lies in [1/2, 1)
// for an even exponent and in [1/4, 1/2) for an odd one. As in the method, the
// shifter is a row of 2:1 multiplexers, one per output bit, all selected by e0;
// bits shifted out at the bottom are dropped (truncation, which keeps the
// first-stage product below its exact value).
//
// Interface: e0 and m22..m9 in, b1 (format 0.15) out. Combinational.
module denorm_shifter
  import isqrt_pkg::*;
(
  input  logic            e0,
  input  logic [13:0]     m_hi,   // m22..m9
  output logic [B1_W-1:0] b1      // weights 2^-1 .. 2^-15
);

  // Unshifted word 0.1 m22..m9 and, one place lower, the shifted word 0.01 m22..m10.
  logic [B1_W:0] word;
  assign word = {1'b0, 1'b1, m_hi};

  always_comb begin
    for (int i = 0; i < B1_W; i++) begin
      b1[i] = e0 ? word[i+1] : word[i];
    end
  end

endmodule
