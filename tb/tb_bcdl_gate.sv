// Self-checking testbench for bcdl_gate.
// Drives a 4-gate row over many clock cycles with new tree values set while
// the clock is low. In every low phase both rails must be all zeros
// (precharge); in every high phase out must equal f and outb its complement
// (evaluation). Both phases are counted and must each occur.
module tb_bcdl_gate;
  int checks = 0, failures = 0;
  int precharges = 0, evaluations = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] f, out, outb;

  bcdl_gate #(.W(4)) dut (.clk(clk), .f(f), .out(out), .outb(outb));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    f = 4'h0;
    repeat (500) begin
      @(negedge clk);
      f = 4'($urandom);
      #2;
      checks++;
      precharges++;
      if (out !== 4'h0 || outb !== 4'h0) begin
        failures++;
        $display("FAIL precharge out=%b outb=%b", out, outb);
      end
      @(posedge clk);
      #2;
      checks++;
      evaluations++;
      if (out !== f || outb !== ~f) begin
        failures++;
        $display("FAIL evaluate f=%b out=%b outb=%b", f, out, outb);
      end
    end
    checks++;
    if (precharges == 0 || evaluations == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
