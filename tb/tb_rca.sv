// Self-checking testbench for rca.
// Exhaustive over a, b and cin for the default 2-bit adder and for a 5-bit
// one; the expected {cout, s} is a + b + cin computed with integers.
module tb_rca;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] a2, b2, s2;
  logic [4:0] a5, b5, s5;
  logic       cin, co2, co5;

  rca           dut2 (.a(a2), .b(b2), .cin(cin), .s(s2), .cout(co2));
  rca #(.W(5))  dut5 (.a(a5), .b(b5), .cin(cin), .s(s5), .cout(co5));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < 32; i++)
        for (int j = 0; j < 32; j++) begin
          cin = 1'(c);
          a5 = 5'(i); b5 = 5'(j);
          a2 = 2'(i); b2 = 2'(j);
          #1;
          checks++;
          if ({co5, s5} !== 6'(i + j + c)) begin
            failures++;
            $display("FAIL W=5 %0d+%0d+%0d -> %0d", i, j, c, {co5, s5});
          end
          if (i < 4 && j < 4) begin
            checks++;
            if ({co2, s2} !== 3'(i + j + c)) begin
              failures++;
              $display("FAIL W=2 %0d+%0d+%0d -> %0d", i, j, c, {co2, s2});
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
