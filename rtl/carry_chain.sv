// Ripple carry chain of one adder subsection.
//
// From the group's propagate (p) and generate (g) bits and a carry in it
// ripples c[i+1] = g[i] | (p[i] & c[i]) across W = 8 bit positions, the
// 8-bit ripple carry chain of the 64-bit adder. c[0] is the carry in and
// c[W] the group carry out; c[W-1:0] are the carries into each bit, which a
// sum block turns into sum bits. Each upper subsection of the adder has two
// of these chains, one with carry in 0 and one with carry in 1.
//
// Interface: p, g are W bits, cin one bit, c is W+1 bits. Combinational.
module carry_chain #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] p,
  input  logic [W-1:0] g,
  input  logic         cin,
  output logic [W:0]   c
);

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    assign c[i+1] = g[i] | (p[i] & c[i]);
  end

endmodule
