// Self-checking testbench for prop_block.
// Random and corner 64-bit operands; p and g are checked bit by bit against
// the truth table of a half adder (p set when exactly one bit is set, g set
// when both are).
module tb_prop_block;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [63:0] a, b, p, g;

  prop_block dut (.a(a), .b(b), .p(p), .g(g));

  task automatic check();
    #1;
    for (int i = 0; i < 64; i++) begin
      int ones = int'(a[i]) + int'(b[i]);
      checks++;
      if (p[i] !== (ones == 1) || g[i] !== (ones == 2)) begin
        failures++;
        $display("FAIL bit %0d a=%b b=%b p=%b g=%b", i, a[i], b[i], p[i], g[i]);
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; check();
    a = '1; b = '0; check();
    a = '1; b = '1; check();
    a = '0; b = '1; check();
    repeat (500) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
