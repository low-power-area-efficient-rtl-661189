// BEC with 2W:W multiplexer: the basic carry-select cell.
//
// A W-bit word b is fed both straight to input 0 of a multiplexer and through
// a binary to excess-1 converter to input 1. The select line cin picks
// s = b (cin = 0) or s = b + 1 modulo 2^W (cin = 1). For W = 4 this is the
// 4-bit BEC with 8:4 multiplexer of the design. In a carry-select adder b
// is the {carry, sum} result a group computed for carry in 0, and cin is the
// real carry into the group.
//
// Interface: b, s are W bits; cin is the select. Combinational.
module bec_mux #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s
);

  logic [W-1:0] b_plus1;

  bec #(.W(W)) u_bec (
    .b(b),
    .x(b_plus1)
  );

  always_comb s = cin ? b_plus1 : b;

endmodule
