// Group carry-select cell (the cells in the BEC row of the 64-bit adder).
//
// A run of N adder subsections has, for each subsection j, the carry out it
// gives when its carry in is 0 (c0[j]) and when it is 1 (c1[j]). Given the
// run's carry in, the carry out of the last subsection follows by selecting
// subsection by subsection, c[j+1] = c[j] ? c1[j] : c0[j]. This cell forms
// that result in one level, as a sum of products over all subsections, in
// the way each cell of the adder takes the outgoing carries of all the
// subsections before it:
//   cout = c0[N-1] | c1[N-1] & c0[N-2] | ... | c1[N-1] & ... & c1[0] & cin.
// The expansion is exact because a carry chain's carry out for carry in 1 is
// never lower than for carry in 0 (c0[j] implies c1[j]). The one-level
// sum of products is this design's reading of what these cells compute.
//
// Interface: c0, c1 are N bits (index 0 is the lowest subsection); cin and
// cout single bits. Combinational.
module carry_sel_bec #(
  parameter int unsigned N = 1
) (
  input  logic [N-1:0] c0,
  input  logic [N-1:0] c1,
  input  logic         cin,
  output logic         cout
);

  logic [N:0] prop_above;  // prop_above[j] = &c1[N-1:j]

  logic [N-1:0] term;       // term[j]: generated in j, propagated above

  assign prop_above[N] = 1'b1;

  for (genvar j = 0; j < N; j++) begin : g_term
    assign prop_above[j] = prop_above[j+1] & c1[j];
    assign term[j]       = prop_above[j+1] & c0[j];
  end

  assign cout = (|term) | (prop_above[0] & cin);

endmodule
