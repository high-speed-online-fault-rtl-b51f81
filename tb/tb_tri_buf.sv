// tb_tri_buf: self-check of the enabled checker buffer: with en = 1 the
// output follows d, with en = 0 it is all zeros, for every 5-bit d.
module tb_tri_buf;
  logic [4:0] d, y;
  logic       en;
  int checks = 0, failures = 0;

  tri_buf dut (.en, .d, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      {en, d} = 6'(i);
      #1;
      checks++;
      if (y !== (en ? d : 5'd0)) begin
        failures++;
        $display("FAIL en=%0d d=%b y=%b", en, d, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
