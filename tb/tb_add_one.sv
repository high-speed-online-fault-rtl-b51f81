// tb_add_one: exhaustive self-check of the 5-bit add-one circuit against
// x + 1 modulo 32.
module tb_add_one;
  logic [4:0] x, y;
  int checks = 0, failures = 0;

  add_one dut (.x, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      x = 5'(i);
      #1;
      checks++;
      if (y !== 5'(i + 1)) begin
        failures++;
        $display("FAIL x=%0d y=%0d", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
