// Self-checking testbench for sum_block.
// With p = a ^ b and c the carries of a + b + cin (taken from the integer
// sum: c = (a + b + cin) ^ a ^ b), the sum block must return the low 8 bits
// of a + b + cin. Exhaustive over a, b and cin.
module tb_sum_block;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] a, b, c, s;

  sum_block dut (.p(a ^ b), .c(c), .s(s));

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
          a = 8'(i); b = 8'(j);
          c = 8'(i + j + k) ^ a ^ b;
          #1;
          checks++;
          if (s !== 8'(i + j + k)) begin
            failures++;
            if (failures < 10) $display("FAIL a=%h b=%h cin=%0d s=%h", a, b, k, s);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
