// Self-checking testbench for csla16_bec.
// Corner operands (carries rippling through every group, all-ones words)
// and 200000 random ones; {cout, s} must equal a + b + cin. It also counts,
// for each group above the lowest, how often its carry in was 0 and 1, and
// how often a carry was produced only by the BEC (the group's carry-in-0
// result had no carry out and all sum bits set, and the carry in was 1);
// a case that never happened counts as a failure.
module tb_csla16_bec;
  import bcdl_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] a, b, s;
  logic        cin, cout;
  int          sel0 [CSLA16_GROUPS], sel1 [CSLA16_GROUPS];
  int          bec_carry = 0;

  csla16_bec dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  task automatic apply(logic [15:0] ta, logic [15:0] tb_, logic tc);
    logic [16:0] expect_sum;
    a = ta; b = tb_; cin = tc;
    #1;
    expect_sum = 17'(ta) + 17'(tb_) + 17'(tc);
    checks++;
    if ({cout, s} !== expect_sum) begin
      failures++;
      if (failures < 10) $display("FAIL %h+%h+%b = %h, got %h", ta, tb_, tc, expect_sum, {cout, s});
    end
    for (int k = 1; k < CSLA16_GROUPS; k++) begin
      int unsigned lsb = csla16_lsb(k);
      int unsigned w   = CSLA16_GW[k];
      int unsigned m   = (1 << lsb) - 1;
      int unsigned cin_k = ((int'(ta) & m) + (int'(tb_) & m) + int'(tc)) >> lsb;
      int unsigned r0    = ((int'(ta) >> lsb) & ((1 << w) - 1)) + ((int'(tb_) >> lsb) & ((1 << w) - 1));
      if (cin_k != 0) sel1[k]++; else sel0[k]++;
      if (cin_k != 0 && r0 == (1 << w) - 1) bec_carry++;
    end
  endtask

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (sel0[k]) begin sel0[k] = 0; sel1[k] = 0; end
    apply(16'h0000, 16'h0000, 1'b0);
    apply(16'hffff, 16'h0000, 1'b1);
    apply(16'hffff, 16'hffff, 1'b1);
    apply(16'hffff, 16'hffff, 1'b0);
    apply(16'h7fff, 16'h0001, 1'b0);
    apply(16'h0003, 16'h0001, 1'b0);
    repeat (200000) apply(16'($urandom), 16'($urandom), 1'($urandom));
    for (int k = 1; k < CSLA16_GROUPS; k++) begin
      $display("group %0d: carry in 0 x%0d, carry in 1 x%0d", k, sel0[k], sel1[k]);
      checks++;
      if (sel0[k] == 0 || sel1[k] == 0) failures++;
    end
    $display("carries made by the BEC alone: %0d", bec_carry);
    checks++;
    if (bec_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
