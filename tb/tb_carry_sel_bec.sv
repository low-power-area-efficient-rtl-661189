// Self-checking testbench for carry_sel_bec.
// For one- and four-subsection cells, every legal input (a subsection's carry
// out for carry in 0 never exceeds the one for carry in 1) and both carry-in
// values are applied; the expected carry out comes from selecting subsection
// by subsection, c = c ? c1[j] : c0[j].
module tb_carry_sel_bec;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] c0, c1;
  logic       cin, cout4, cout1;

  carry_sel_bec #(.N(4)) dut4 (.c0(c0), .c1(c1), .cin(cin), .cout(cout4));
  carry_sel_bec          dut1 (.c0(c0[0]), .c1(c1[0]), .cin(cin), .cout(cout1));

  function automatic logic ref_chain(logic [3:0] r0, logic [3:0] r1, logic ci, int n);
    logic c = ci;
    for (int j = 0; j < n; j++) c = c ? r1[j] : r0[j];
    return c;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2; k++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          if ((i & ~j) != 0) continue;  // c0 implies c1
          c0 = 4'(i); c1 = 4'(j); cin = 1'(k);
          #1;
          checks += 2;
          if (cout4 !== ref_chain(c0, c1, cin, 4)) begin
            failures++;
            $display("FAIL N=4 c0=%b c1=%b cin=%b cout=%b", c0, c1, cin, cout4);
          end
          if (cout1 !== ref_chain(c0, c1, cin, 1)) begin
            failures++;
            $display("FAIL N=1 c0=%b c1=%b cin=%b cout=%b", c0[0], c1[0], cin, cout1);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
