// Self-checking testbench for bec_mux.
// Every b and select value of the 4-bit cell (8:4 multiplexer) and of a
// 5-bit cell: output must be b for cin = 0 and b + 1 (wrapping) for cin = 1.
module tb_bec_mux;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] b4, s4;
  logic [4:0] b5, s5;
  logic       cin;

  bec_mux #(.W(4)) dut4 (.b(b4), .cin(cin), .s(s4));
  bec_mux #(.W(5)) dut5 (.b(b5), .cin(cin), .s(s5));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      for (int i = 0; i < 32; i++) begin
        cin = 1'(c);
        b4  = 4'(i);
        b5  = 5'(i);
        #1;
        checks += 2;
        if (s4 !== 4'((i + c) % 16)) begin
          failures++;
          $display("FAIL W=4 b=%b cin=%b s=%b", b4, cin, s4);
        end
        if (s5 !== 5'((i + c) % 32)) begin
          failures++;
          $display("FAIL W=5 b=%b cin=%b s=%b", b5, cin, s5);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
