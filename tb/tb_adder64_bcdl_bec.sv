// Self-checking testbench for adder64_bcdl_bec.
// The default 64-bit adder and a 20-bit one with 4-bit subsections (an odd
// number of subsections, so the halves differ in size) get corner operands
// and random ones; {cout, s} must equal a + b + cin. For the 64-bit adder it
// also counts, from the operands alone, how often each subsection's carry in
// was 0 and 1, how often the carry from the lower half c[32] was 0 and 1,
// and how often a carry rippled through every subsection; a case that never
// happened counts as a failure.
module tb_adder64_bcdl_bec;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [63:0] a, b, s;
  logic        cin, cout;
  logic [19:0] a20, b20, s20;
  logic        cout20;
  int          sub0 [8], sub1 [8];
  int          full_ripple = 0;

  adder64_bcdl_bec dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  adder64_bcdl_bec #(.WIDTH(20), .GW(4)) dut20 (
    .a(a20), .b(b20), .cin(cin), .s(s20), .cout(cout20)
  );

  task automatic apply(logic [63:0] ta, logic [63:0] tb_, logic tc);
    logic [64:0] expect_sum;
    logic [64:0] carries;
    a = ta; b = tb_; cin = tc;
    a20 = ta[19:0]; b20 = tb_[19:0];
    #1;
    expect_sum = 65'(ta) + 65'(tb_) + 65'(tc);
    checks += 2;
    if ({cout, s} !== expect_sum) begin
      failures++;
      if (failures < 10) $display("FAIL %h+%h+%b = %h, got %h", ta, tb_, tc, expect_sum, {cout, s});
    end
    if ({cout20, s20} !== 21'(21'(ta[19:0]) + 21'(tb_[19:0]) + 21'(tc))) begin
      failures++;
      if (failures < 10) $display("FAIL20 %h+%h+%b got %h", ta[19:0], tb_[19:0], tc, {cout20, s20});
    end
    carries = expect_sum ^ {1'b0, ta} ^ {1'b0, tb_};  // carry into each bit
    for (int k = 1; k < 8; k++) if (carries[8*k]) sub1[k]++; else sub0[k]++;
    if (tc && (&(ta ^ tb_))) full_ripple++;
  endtask

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (sub0[k]) begin sub0[k] = 0; sub1[k] = 0; end
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '1, 1'b0);
    apply(64'h5555_5555_5555_5555, 64'haaaa_aaaa_aaaa_aaaa, 1'b1);
    apply(64'h0000_0000_ffff_ffff, 64'h0000_0000_0000_0001, 1'b0);
    apply(64'h00ff_ff00_0000_0000, 64'h0000_0100_0000_0000, 1'b0);
    for (int k = 0; k < 64; k++) apply(64'h1 << k, ~(64'h1 << k), 1'b1);
    repeat (100000) apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    // Long propagate runs with a generate at a random place.
    repeat (20000) begin
      logic [63:0] ra, rb;
      int pos;
      ra = {$urandom, $urandom};
      pos = $urandom_range(0, 63);
      rb = ~ra;
      rb[pos] = ra[pos];
      apply(ra, rb, 1'($urandom));
    end
    for (int k = 1; k < 8; k++) begin
      $display("subsection %0d: carry in 0 x%0d, carry in 1 x%0d", k, sub0[k], sub1[k]);
      checks++;
      if (sub0[k] == 0 || sub1[k] == 0) failures++;
    end
    $display("carry through all subsections: %0d", full_ripple);
    checks++;
    if (full_ripple == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
