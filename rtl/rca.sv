// Ripple carry adder (RCA) of W bits.
//
// A chain of W full adders: sum bit i = a[i] ^ b[i] ^ c[i] and
// c[i+1] = a[i] & b[i] | c[i] & (a[i] ^ b[i]), with c[0] = cin and
// cout = c[W]. The design names these blocks only; the full-adder chain is
// the textbook form. The 16-bit carry-select adder uses one with the real
// carry in for its lowest 2 bits and, in every other group, one with carry
// in tied to 0. W defaults to 2, the width of the lowest group.
//
// Interface: a, b, s are W bits; cin, cout single bits. Combinational.
module rca #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end

  assign cout = c[W];

endmodule
