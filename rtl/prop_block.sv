// Propagation block of the 64-bit adder.
//
// Forms, for every bit position, the propagate signal p = a ^ b and the
// generate signal g = a & b that the carry chains and sum blocks of the
// adder share. The design names the block and shows p[...] leaving it; the
// generate output is this design's choice of how the carry chains get the
// rest of what they need.
//
// Interface: a, b in; p, g out; W bits each. Combinational.
module prop_block #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] p,
  output logic [W-1:0] g
);

  always_comb begin
    p = a ^ b;
    g = a & b;
  end

endmodule
