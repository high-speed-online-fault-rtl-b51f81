// tb_rca_cell4: exhaustive self-check of the 4-bit adder cell. All 512
// combinations of a, b and cin are applied and {cout, sum} is compared with
// a + b + cin computed by the testbench.
module tb_rca_cell4;
  logic [3:0] a, b, sum;
  logic       cin, cout;
  int checks = 0, failures = 0;

  rca_cell4 dut (.a, .b, .cin, .sum, .cout);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, a, b} = 9'(i);
      #1;
      checks++;
      if ({cout, sum} !== 5'(a) + 5'(b) + 5'(cin)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d -> %0d", a, b, cin, {cout, sum});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
