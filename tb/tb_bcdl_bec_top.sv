// End-to-end testbench for bcdl_bec_top, with the top at its defaults.
// Each clock cycle the operands of both adders change during the low phase.
// In the low (precharge) phase both rails of the 64-bit result must be zero;
// in the high (evaluation) phase sum_t must be a + b + cin and sum_f its
// complement. The 16-bit adder is checked against a16 + b16 + cin16.
// Counted from the operands, and each required to happen at least once:
// precharge and evaluation phases, the carry from the lower half c[32]
// being 0 and being 1, a 64-bit carry out, a carry rippling through all
// subsections, each 16-bit group's carry in being 0 and 1, and a 16-bit
// group carry produced only by its BEC.
module tb_bcdl_bec_top;
  import bcdl_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [63:0] a, b;
  logic        cin;
  logic [64:0] sum_t, sum_f;
  logic [15:0] a16, b16, s16;
  logic        cin16, cout16;

  typedef enum int {
    EV_PRECHARGE, EV_EVALUATE, EV_C32_0, EV_C32_1, EV_COUT64, EV_FULL_RIPPLE,
    EV_BEC_CARRY, EV_G16_CIN0, EV_G16_CIN1, EV_COUNT
  } event_e;
  int          seen [EV_COUNT];
  int          g16_cin0 [CSLA16_GROUPS], g16_cin1 [CSLA16_GROUPS];

  bcdl_bec_top dut (
    .clk(clk), .a(a), .b(b), .cin(cin), .sum_t(sum_t), .sum_f(sum_f),
    .a16(a16), .b16(b16), .cin16(cin16), .s16(s16), .cout16(cout16)
  );

  function automatic void count_16(logic [15:0] ta, logic [15:0] tb_, logic tc);
    for (int k = 1; k < CSLA16_GROUPS; k++) begin
      int unsigned lsb = csla16_lsb(k);
      int unsigned w   = CSLA16_GW[k];
      int unsigned m   = (1 << lsb) - 1;
      int unsigned cin_k = ((int'(ta) & m) + (int'(tb_) & m) + int'(tc)) >> lsb;
      int unsigned r0    = ((int'(ta) >> lsb) & ((1 << w) - 1)) + ((int'(tb_) >> lsb) & ((1 << w) - 1));
      if (cin_k != 0) g16_cin1[k]++; else g16_cin0[k]++;
      if (cin_k != 0 && r0 == (1 << w) - 1) seen[EV_BEC_CARRY]++;
    end
  endfunction

  task automatic one_cycle(logic [63:0] ta, logic [63:0] tb_, logic tc,
                           logic [15:0] ta16, logic [15:0] tb16, logic tc16);
    logic [64:0] expect_sum;
    @(negedge clk);
    a = ta; b = tb_; cin = tc;
    a16 = ta16; b16 = tb16; cin16 = tc16;
    #1;
    checks++;
    seen[EV_PRECHARGE]++;
    if (sum_t !== '0 || sum_f !== '0) begin
      failures++;
      if (failures < 10) $display("FAIL precharge sum_t=%h sum_f=%h", sum_t, sum_f);
    end
    checks++;
    if ({cout16, s16} !== 17'(17'(ta16) + 17'(tb16) + 17'(tc16))) begin
      failures++;
      if (failures < 10) $display("FAIL 16-bit %h+%h+%b got %h", ta16, tb16, tc16, {cout16, s16});
    end
    count_16(ta16, tb16, tc16);
    @(posedge clk);
    #1;
    expect_sum = 65'(ta) + 65'(tb_) + 65'(tc);
    checks++;
    seen[EV_EVALUATE]++;
    if (sum_t !== expect_sum || sum_f !== ~expect_sum) begin
      failures++;
      if (failures < 10) $display("FAIL %h+%h+%b = %h, got t=%h f=%h", ta, tb_, tc, expect_sum, sum_t, sum_f);
    end
    if ((33'(ta[31:0]) + 33'(tb_[31:0]) + 33'(tc)) >> 32 != 0) seen[EV_C32_1]++;
    else seen[EV_C32_0]++;
    if (expect_sum[64]) seen[EV_COUT64]++;
    if (tc && (&(ta ^ tb_))) seen[EV_FULL_RIPPLE]++;
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    foreach (g16_cin0[k]) begin g16_cin0[k] = 0; g16_cin1[k] = 0; end
    a = '0; b = '0; cin = 1'b0; a16 = '0; b16 = '0; cin16 = 1'b0;
    one_cycle('0, '0, 1'b0, '0, '0, 1'b0);
    one_cycle('1, '0, 1'b1, 16'hffff, 16'h0000, 1'b1);
    one_cycle('1, '1, 1'b1, 16'hffff, 16'hffff, 1'b1);
    one_cycle(64'h0000_0000_ffff_ffff, 64'h1, 1'b0, 16'h0078, 16'h0008, 1'b0);
    repeat (20000) begin
      logic [63:0] ra, rb;
      int pos;
      ra = {$urandom, $urandom};
      rb = {$urandom, $urandom};
      if ($urandom_range(0, 3) == 0) begin
        // long propagate run with a single generate somewhere
        pos = $urandom_range(0, 63);
        rb = ~ra;
        rb[pos] = ra[pos];
      end
      one_cycle(ra, rb, 1'($urandom), 16'($urandom), 16'($urandom), 1'($urandom));
    end
    for (int k = 1; k < CSLA16_GROUPS; k++) begin
      if (g16_cin0[k] > 0) seen[EV_G16_CIN0]++;
      if (g16_cin1[k] > 0) seen[EV_G16_CIN1]++;
    end
    for (int i = 0; i < EV_COUNT; i++) begin
      event_e e;
      e = event_e'(i);
      $display("%s: %0d", e.name(), seen[i]);
      checks++;
      if (seen[i] == 0) failures++;
    end
    // every 16-bit group above the lowest must have seen both carry values
    checks++;
    if (seen[EV_G16_CIN0] != CSLA16_GROUPS - 1 || seen[EV_G16_CIN1] != CSLA16_GROUPS - 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
