// tb_mux2: self-check of the 5-bit 2-to-1 multiplexer over all pairs of
// inputs that differ, for both select values.
module tb_mux2;
  logic [4:0] d0, d1, y;
  logic       sel;
  int checks = 0, failures = 0;

  mux2 dut (.d0, .d1, .sel, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++)
        for (int s = 0; s < 2; s++) begin
          d0 = 5'(i); d1 = 5'(j); sel = 1'(s);
          #1;
          checks++;
          if (y !== (s == 1 ? 5'(j) : 5'(i))) begin
            failures++;
            $display("FAIL d0=%0d d1=%0d sel=%0d y=%0d", d0, d1, sel, y);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
