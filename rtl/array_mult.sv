// array_mult: parameterised array multiplier.
//
// Forms one partial-product row per bit of the multiplier a (the multiplicand b
// gated by that bit and shifted into place) and adds the rows in a ripple of
// adders, the structure of a classic array multiplier. With A_SIGNED set, a is a
// two's-complement number and its top row is subtracted instead of added
// (b stays unsigned); the product is then two's complement too. The method names
// the multipliers and their sizes but not their inner structure, so this plain
// row-by-row array is the implementation's own choice.
//
// Interface: a (A_W bits), b (B_W bits) in, p (A_W+B_W bits) out. Combinational.
module array_mult #(
  parameter int unsigned A_W      = 8,
  parameter int unsigned B_W      = 8,
  parameter bit          A_SIGNED = 1'b0
) (
  input  logic [A_W-1:0]     a,
  input  logic [B_W-1:0]     b,
  output logic [A_W+B_W-1:0] p
);

  logic [A_W+B_W-1:0] row [A_W];
  logic [A_W+B_W-1:0] acc [A_W+1];

  for (genvar i = 0; i < A_W; i++) begin : g_row
    assign row[i] = a[i] ? ((A_W+B_W)'(b) << i) : '0;
  end

  assign acc[0] = '0;
  for (genvar i = 0; i < A_W; i++) begin : g_acc
    if (A_SIGNED && i == A_W - 1) begin : g_sub
      assign acc[i+1] = acc[i] - row[i];
    end else begin : g_add
      assign acc[i+1] = acc[i] + row[i];
    end
  end

  assign p = acc[A_W];

endmodule
