// 16-bit modified carry-select adder with binary to excess-1 converters.
//
// The word is split into five groups of 2, 2, 3, 4 and 5 bits (bits 1:0,
// 3:2, 6:4, 10:7, 15:11). The lowest group is a plain 2-bit ripple carry
// adder. Each other group of n bits has one n-bit ripple carry adder with
// carry in 0, whose (n+1)-bit result {carry, sum} goes both straight to a
// multiplexer and through an (n+1)-bit BEC that adds one; the carry out of
// the group below selects which one is used (the 6:3, 8:4, 10:5 and 12:6
// multiplexers). This replaces the second, carry-in-1 adder of a regular
// carry-select adder with the cheaper BEC. Group sizes and the structure
// follow the design's 16-bit diagram; the carry in of the lowest group is
// this design's addition (the diagram shows none).
//
// Interface: a, b, s are 16 bits; cin carry in; cout carry out.
// Combinational.
module csla16_bec
  import bcdl_pkg::*;
(
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] s,
  output logic        cout
);

  logic [CSLA16_GROUPS:0] gc;  // gc[k]: carry into group k

  assign gc[0] = cin;

  rca #(.W(CSLA16_GW[0])) u_rca0 (
    .a(a[CSLA16_GW[0]-1:0]), .b(b[CSLA16_GW[0]-1:0]), .cin(gc[0]),
    .s(s[CSLA16_GW[0]-1:0]), .cout(gc[1])
  );

  for (genvar k = 1; k < CSLA16_GROUPS; k++) begin : g_grp
    localparam int unsigned N   = CSLA16_GW[k];
    localparam int unsigned LSB = csla16_lsb(k);

    logic [N-1:0] s_c0;
    logic         co_c0;

    rca #(.W(N)) u_rca (
      .a(a[LSB +: N]), .b(b[LSB +: N]), .cin(1'b0),
      .s(s_c0), .cout(co_c0)
    );
    bec_mux #(.W(N + 1)) u_bec_mux (
      .b({co_c0, s_c0}), .cin(gc[k]), .s({gc[k+1], s[LSB +: N]})
    );
  end

  assign cout = gc[CSLA16_GROUPS];

endmodule
