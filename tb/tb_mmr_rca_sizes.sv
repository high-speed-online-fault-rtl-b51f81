// tb_mmr_rca_sizes: runs the MMR adder at the other widths for which the
// number of cell pairs is tabulated (16, 32 and 128 bits, i.e. 4, 8 and 32
// cells) with the random and fault-injection checks of mmr_rca_sweep, and
// sums their results.
module tb_mmr_rca_sizes;
  bit done16, done32, done128;
  int c16, c32, c128, f16, f32, f128;
  int checks = 0, failures = 0;

  mmr_rca_sweep #(.N(16))  u16  (.done(done16),  .checks(c16),  .failures(f16));
  mmr_rca_sweep #(.N(32))  u32  (.done(done32),  .checks(c32),  .failures(f32));
  mmr_rca_sweep #(.N(128)) u128 (.done(done128), .checks(c128), .failures(f128));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done16 && done32 && done128);
    checks   = c16 + c32 + c128;
    failures = f16 + f32 + f128;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
