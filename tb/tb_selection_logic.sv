// tb_selection_logic: self-check of the carry-in selection logic. For the
// four carry-in combinations it checks that equal carry-ins select no
// correction, and that only the path whose cell had carry-in 0 is routed
// through the add-one circuit when they differ.
module tb_selection_logic;
  logic cin_hi, cin_lo, sel1, sel0;
  int checks = 0, failures = 0;

  selection_logic dut (.cin_hi, .cin_lo, .sel1, .sel0);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // {cin_hi, cin_lo} -> expected {sel1, sel0}
    logic [1:0] want [4] = '{2'b00, 2'b10, 2'b01, 2'b00};
    for (int i = 0; i < 4; i++) begin
      {cin_hi, cin_lo} = 2'(i);
      #1;
      checks++;
      if ({sel1, sel0} !== want[i]) begin
        failures++;
        $display("FAIL cin_hi=%0d cin_lo=%0d -> sel1=%0d sel0=%0d", cin_hi, cin_lo, sel1, sel0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
