// Binary to excess-1 converter (BEC).
//
// Adds one to a W-bit word without an adder: bit 0 is inverted and every
// higher bit i is XORed with the AND of all bits below it,
//   x[0] = ~b[0],  x[i] = b[i] ^ (b[0] & ... & b[i-1]).
// For W = 4 these are the four equations of the converter in the design
// (X0 = ~B0, X1 = B0 ^ B1, X2 = B2 ^ (B0 & B1), X3 = B3 ^ (B0 & B1 & B2)),
// so 1111 wraps to 0000. The AND terms are formed as a running chain, one
// AND gate per bit as in the 4-bit gate diagram; wider instances (used by
// the 16-bit carry-select adder) extend the same pattern, which is this
// design's generalisation.
//
// Interface: b in, x out, W bits each. Purely combinational, no clock.
module bec #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] b,
  output logic [W-1:0] x
);

  logic [W-1:0] all_ones_below;  // all_ones_below[i] = &b[i-1:0]

  assign all_ones_below[0] = 1'b1;
  assign x[0]              = ~b[0];

  for (genvar i = 1; i < W; i++) begin : g_bit
    assign all_ones_below[i] = all_ones_below[i-1] & b[i-1];
    assign x[i]              = b[i] ^ all_ones_below[i];
  end

endmodule
