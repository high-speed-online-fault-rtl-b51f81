// tb_priority_encoder: self-check of the upper (highest set bit) and lower
// (lowest set bit) priority encoders with 16 request bits. Every single bit,
// every pair of bits, all-zero and random words are applied; the expected
// index is found by scanning the word in the testbench.
module tb_priority_encoder;
  logic [15:0] req;
  logic [3:0]  idx_hi, idx_lo;
  logic        v_hi, v_lo;
  int checks = 0, failures = 0;

  priority_encoder #(.NIN(16), .HIGHEST(1'b1)) u_hi (.req, .idx(idx_hi), .valid(v_hi));
  priority_encoder #(.NIN(16), .HIGHEST(1'b0)) u_lo (.req, .idx(idx_lo), .valid(v_lo));

  task automatic check();
    int hi, lo;
    #1;
    hi = 0; lo = 0;
    for (int i = 15; i >= 0; i--) if (req[i]) lo = i;
    for (int i = 0; i < 16; i++)  if (req[i]) hi = i;
    checks += 2;
    if (v_hi !== (req != 0) || v_lo !== (req != 0)) begin
      failures++;
      $display("FAIL valid req=%b", req);
    end
    if (idx_hi !== 4'(hi) || idx_lo !== 4'(lo)) begin
      failures++;
      $display("FAIL req=%b hi=%0d lo=%0d got %0d %0d", req, hi, lo, idx_hi, idx_lo);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; check();
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        req = (16'(1) << i) | (16'(1) << j);
        check();
      end
    for (int n = 0; n < 500; n++) begin
      req = 16'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
