// Sum block of one adder subsection.
//
// Each sum bit is the propagate bit XORed with the carry into that bit:
// s[i] = p[i] ^ c[i]. An upper subsection has two of these, one fed by the
// carry chain that assumed carry in 0 and one by the chain that assumed 1.
//
// Interface: p, c, s are W bits. Combinational.
module sum_block #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] p,
  input  logic [W-1:0] c,
  output logic [W-1:0] s
);

  always_comb s = p ^ c;

endmodule
