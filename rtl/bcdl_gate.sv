// Behavioural model of a boosted CMOS differential logic (BCDL) gate.
//
// The real gate is a transistor-level dynamic circuit: a differential logic
// tree between two precharged nodes P and PB, a clocked foot transistor,
// output inverters, and a voltage-boosting block (a capacitor that pulls the
// tree's foot below ground during evaluation to speed it up). This model
// keeps only its logic behaviour, W gates side by side:
//  * Precharge (clk low): P and PB are pulled to the supply, so both
//    outputs out and outb are low.
//  * Boosted evaluation (clk high): the tree discharges PB when its
//    function f is true and P when it is false, so out = f and outb = ~f.
// Both phases and the low outputs in precharge are as the design describes
// them; the boosting only changes speed and voltage, which a logic model
// cannot show. Treating f as settled for the whole evaluation phase (the
// usual rule for precharged logic) is this model's assumption: a real
// dynamic node, once discharged, does not recover until the next precharge.
// The model reports an error when f changes while clk is high.
//
// Interface: clk, f (W bits) in; out, outb (W bits, dual rail) out.
// No delays, so it also synthesizes as clk-gated logic.
module bcdl_gate #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic [W-1:0] f,
  output logic [W-1:0] out,
  output logic [W-1:0] outb
);

  logic [W-1:0] pb_n, p_n;  // precharge nodes; 1 = at supply

  always_comb begin
    pb_n = clk ? ~f : '1;
    p_n  = clk ?  f : '1;
    out  = ~pb_n;
    outb = ~p_n;
  end

  // Rule of precharged logic: the tree inputs hold still while the gate
  // evaluates, because a discharged node cannot recover before precharge.
  always @(f) begin
    a_inputs_stable: assert (!clk)
      else $error("bcdl_gate: input changed during evaluation (clk high)");
  end

endmodule
