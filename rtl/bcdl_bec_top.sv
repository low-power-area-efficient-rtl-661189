// Top level: the 64-bit BCDL-BEC adder and the 16-bit modified CSLA.
//
// The 64-bit carry-select adder (adder64_bcdl_bec) adds a and b with carry
// in cin. Its 65-bit result {cout, s} is delivered the way a BCDL datapath
// presents it, on dual-rail outputs from a row of BCDL gates: while clk is
// low (precharge) both rails sum_t and sum_f are all zeros; while clk is
// high (evaluation) sum_t is the result and sum_f its complement. Placing
// the BCDL gates as an output stage over a logic-level adder is this
// design's way of joining the logic family and the adder, not a gate-level
// BCDL netlist.
//
// Beside it, with its own ports, stands the 16-bit modified carry-select
// adder with binary to excess-1 converters (csla16_bec), combinational.
//
// Timing: operands must be stable before clk rises; the 64-bit result is
// valid on sum_t/sum_f for the rest of the high phase.
module bcdl_bec_top (
  input  logic        clk,
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  logic        cin,
  output logic [64:0] sum_t,
  output logic [64:0] sum_f,
  input  logic [15:0] a16,
  input  logic [15:0] b16,
  input  logic        cin16,
  output logic [15:0] s16,
  output logic        cout16
);

  logic [63:0] s64;
  logic        cout64;

  adder64_bcdl_bec u_adder64 (
    .a(a), .b(b), .cin(cin), .s(s64), .cout(cout64)
  );

  bcdl_gate #(.W(65)) u_out_stage (
    .clk(clk), .f({cout64, s64}), .out(sum_t), .outb(sum_f)
  );

  csla16_bec u_csla16 (
    .a(a16), .b(b16), .cin(cin16), .s(s16), .cout(cout16)
  );

endmodule
