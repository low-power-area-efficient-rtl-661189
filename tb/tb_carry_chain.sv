// Self-checking testbench for carry_chain.
// Exhaustive over two 8-bit operands and the carry in: p and g are formed
// from the operands, and each carry c[i] must equal bit i of the integer sum
// of the operands' low i bits plus the carry in.
module tb_carry_chain;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] a, b;
  logic       cin;
  logic [8:0] c;

  carry_chain dut (.p(a ^ b), .g(a & b), .cin(cin), .c(c));

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2; k++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++) begin
          a = 8'(i); b = 8'(j); cin = 1'(k);
          #1;
          for (int n = 0; n <= 8; n++) begin
            int mask, expect_c;
            mask     = (1 << n) - 1;
            expect_c = (((i & mask) + (j & mask) + k) >> n) & 1;
            checks++;
            if (c[n] !== 1'(expect_c)) begin
              failures++;
              if (failures < 10) $display("FAIL a=%h b=%h cin=%b c[%0d]=%b", a, b, cin, n, c[n]);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
