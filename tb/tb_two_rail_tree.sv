// tb_two_rail_tree: exhaustive self-check of the two-rail checker tree for 5
// pairs (and a 3-pair instance). For every x and y the outputs must be
// complementary exactly when every pair is valid (y = ~x), and equal
// otherwise.
module tb_two_rail_tree;
  logic [4:0] x, y;
  logic       f0, f1;
  logic [2:0] x3, y3;
  logic       g0, g1;
  int checks = 0, failures = 0;

  two_rail_tree dut (.x, .y, .f0, .f1);
  two_rail_tree #(.NPAIR(3)) dut3 (.x(x3), .y(y3), .f0(g0), .f1(g1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      {x, y} = 10'(i);
      x3 = x[2:0]; y3 = y[2:0];
      #1;
      checks += 2;
      if ((f0 != f1) !== (y == ~x)) begin
        failures++;
        $display("FAIL x=%b y=%b f1f0=%b%b", x, y, f1, f0);
      end
      if ((g0 != g1) !== (y3 == ~x3)) begin
        failures++;
        $display("FAIL3 x=%b y=%b g1g0=%b%b", x3, y3, g1, g0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
