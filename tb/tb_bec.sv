// Self-checking testbench for bec.
// Runs every input of the 4-bit converter against its function table
// (x = b + 1 modulo 16, so 0000 -> 0001 and 1111 -> 0000), and every input
// of a 6-bit instance, the widest one the 16-bit adder uses, against
// b + 1 modulo 64. A watchdog ends the run if it stalls.
module tb_bec;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] b4, x4;
  logic [5:0] b6, x6;

  bec #(.W(4)) dut4 (.b(b4), .x(x4));
  bec #(.W(6)) dut6 (.b(b6), .x(x6));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      b4 = 4'(i);
      #1;
      checks++;
      if (x4 !== 4'((i + 1) % 16)) begin
        failures++;
        $display("FAIL W=4 b=%b x=%b", b4, x4);
      end
    end
    // Table rows printed for the 4-bit converter.
    b4 = 4'b0000; #1; checks++; if (x4 !== 4'b0001) failures++;
    b4 = 4'b0001; #1; checks++; if (x4 !== 4'b0010) failures++;
    b4 = 4'b1110; #1; checks++; if (x4 !== 4'b1111) failures++;
    b4 = 4'b1111; #1; checks++; if (x4 !== 4'b0000) failures++;
    for (int i = 0; i < 64; i++) begin
      b6 = 6'(i);
      #1;
      checks++;
      if (x6 !== 6'((i + 1) % 64)) begin
        failures++;
        $display("FAIL W=6 b=%b x=%b", b6, x6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
