// tb_cell_mux: self-check of the 16-to-1, 6-bit cell multiplexer. For random
// input words, every select value is applied and the output is compared with
// the selected word.
module tb_cell_mux;
  logic [15:0][5:0] d;
  logic [3:0]       sel;
  logic [5:0]       y;
  int checks = 0, failures = 0;

  cell_mux dut (.d, .sel, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 50; n++) begin
      for (int k = 0; k < 16; k++) d[k] = 6'($urandom);
      for (int s = 0; s < 16; s++) begin
        sel = 4'(s);
        #1;
        checks++;
        if (y !== d[s]) begin
          failures++;
          $display("FAIL sel=%0d got %h want %h", s, y, d[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
