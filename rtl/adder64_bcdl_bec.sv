// 64-bit carry-select adder with BEC carry-select cells.
//
// The word is cut into WIDTH/GW = 8 subsections of GW = 8 bits.
//  * A propagation block forms p = a ^ b and g = a & b for all 64 bits.
//  * The lowest subsection has one 8-bit ripple carry chain, fed by the real
//    carry in, and one sum block.
//  * Every other subsection has two carry chains, one assuming carry in 0 and
//    one assuming carry in 1, each with its own sum block; a multiplexer
//    picks one of the two sums with the real carry into the subsection.
//  * The carries between subsections come from the carry-select cells
//    ("BEC" row). In the lower half each subsection has one cell, which
//    takes the carry out of subsection 0 and the outgoing carries of all
//    lower-half subsections up to its own. In the upper half each subsection
//    has a pair of cells, computing its carry out for a carry into the upper
//    half of 0 and of 1 from the outgoing carries of the upper-half
//    subsections up to its own; the carry propagated from the lower half,
//    c[32], selects between the pair.
// The structure follows the design's 64-bit block diagram. How the
// carry-select cells combine their inputs (a one-level sum of products) is
// this design's choice; see carry_sel_bec.
//
// Interface: a, b, s are WIDTH bits; cin is c[0]; cout is the carry out
// (s[64] of the diagram). Purely combinational; the design reports no clock
// for the adder (its longest path is a combinational input-to-output path).
// WIDTH must be a multiple of GW with at least two subsections.
module adder64_bcdl_bec #(
  parameter int unsigned WIDTH = bcdl_pkg::ADDER_WIDTH,
  parameter int unsigned GW    = bcdl_pkg::GROUP_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  localparam int unsigned NG = WIDTH / GW;  // subsections
  localparam int unsigned NL = NG / 2;      // subsections in the lower half

  logic [WIDTH-1:0] p, g;
  logic [NG:0]      gc;     // gc[k]: real carry into subsection k (c[GW*k])
  logic [NG-1:1]    gco0;   // carry out of subsection k for carry in 0
  logic [NG-1:1]    gco1;   // carry out of subsection k for carry in 1

  prop_block #(.W(WIDTH)) u_prop (
    .a(a), .b(b), .p(p), .g(g)
  );

  assign gc[0] = cin;

  // Subsection 0: a single carry chain and sum block.
  logic [GW:0] c_g0;
  carry_chain #(.W(GW)) u_chain0 (
    .p(p[GW-1:0]), .g(g[GW-1:0]), .cin(gc[0]), .c(c_g0)
  );
  sum_block #(.W(GW)) u_sum0 (
    .p(p[GW-1:0]), .c(c_g0[GW-1:0]), .s(s[GW-1:0])
  );
  assign gc[1] = c_g0[GW];

  // Subsections 1 .. NG-1: dual carry chains, dual sums, sum multiplexer.
  for (genvar k = 1; k < NG; k++) begin : g_sub
    logic [GW:0]   c0v, c1v;
    logic [GW-1:0] s0v, s1v;

    carry_chain #(.W(GW)) u_chain_c0 (
      .p(p[k*GW +: GW]), .g(g[k*GW +: GW]), .cin(1'b0), .c(c0v)
    );
    carry_chain #(.W(GW)) u_chain_c1 (
      .p(p[k*GW +: GW]), .g(g[k*GW +: GW]), .cin(1'b1), .c(c1v)
    );
    sum_block #(.W(GW)) u_sum_c0 (
      .p(p[k*GW +: GW]), .c(c0v[GW-1:0]), .s(s0v)
    );
    sum_block #(.W(GW)) u_sum_c1 (
      .p(p[k*GW +: GW]), .c(c1v[GW-1:0]), .s(s1v)
    );

    assign gco0[k] = c0v[GW];
    assign gco1[k] = c1v[GW];

    always_comb s[k*GW +: GW] = gc[k] ? s1v : s0v;
  end

  // Lower half: one carry-select cell per subsection, from c[GW].
  for (genvar k = 1; k < NL; k++) begin : g_lower_sel
    carry_sel_bec #(.N(k)) u_sel (
      .c0(gco0[k:1]), .c1(gco1[k:1]), .cin(gc[1]), .cout(gc[k+1])
    );
  end

  // Upper half: a pair of cells per subsection, selected by gc[NL].
  for (genvar k = NL; k < NG; k++) begin : g_upper_sel
    logic co_if0, co_if1;

    carry_sel_bec #(.N(k - NL + 1)) u_sel_c0 (
      .c0(gco0[k:NL]), .c1(gco1[k:NL]), .cin(1'b0), .cout(co_if0)
    );
    carry_sel_bec #(.N(k - NL + 1)) u_sel_c1 (
      .c0(gco0[k:NL]), .c1(gco1[k:NL]), .cin(1'b1), .cout(co_if1)
    );

    assign gc[k+1] = gc[NL] ? co_if1 : co_if0;
  end

  assign cout = gc[NG];

endmodule
