// tb_ripple_carry_adder: self-check of the 64-bit ripple carry adder. Corner
// cases (all ones, a carry rippling through every cell) and random operands
// are applied; sum, cout and every cell's carry-out are compared with a
// 65-bit reference addition done in the testbench.
module tb_ripple_carry_adder;
  localparam int N = 64;
  localparam int NCELL = N / 4;
  logic [N-1:0]     a, b, sum;
  logic             cin, cout;
  logic [NCELL-1:0] cell_cout;
  int checks = 0, failures = 0;

  ripple_carry_adder dut (.a, .b, .cin, .sum, .cout, .cell_cout);

  task automatic check();
    logic [N:0] ref_full;
    logic [N:0] part;
    #1;
    ref_full = {1'b0, a} + {1'b0, b} + (N+1)'(cin);
    checks++;
    if ({cout, sum} !== ref_full) begin
      failures++;
      $display("FAIL sum a=%h b=%h cin=%0d got %h", a, b, cin, {cout, sum});
    end
    for (int i = 0; i < NCELL; i++) begin
      // carry out of cell i = bit 4(i+1) of the sum of the low 4(i+1) bits
      part = ({1'b0, a} & (((N+1)'(1) << (4*(i+1))) - 1))
           + ({1'b0, b} & (((N+1)'(1) << (4*(i+1))) - 1)) + (N+1)'(cin);
      checks++;
      if (cell_cout[i] !== part[4*(i+1)]) begin
        failures++;
        $display("FAIL cell %0d carry", i);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '1; b = '0; cin = 1'b1; check();
    a = '1; b = '1; cin = 1'b1; check();
    a = '0; b = '0; cin = 1'b0; check();
    a = 64'h5555_5555_5555_5555; b = 64'hAAAA_AAAA_AAAA_AAAA; cin = 1'b1; check();
    for (int n = 0; n < 2000; n++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
