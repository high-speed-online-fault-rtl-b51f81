// mmr_rca_sweep: reusable random check of one mmr_rca instance of width N,
// used by tb_mmr_rca_sizes to run the adder at several widths.
//
// It models the external comparator (first pair of cells whose a and b
// slices are equal), drives random operands with frequent copied slices, and
// checks sum, buffer outputs and checker outputs against a reference built
// from a + b + cin, as tb_mmr_rca does at the default width. A second phase
// forces sum bit 12 (bit 0 of cell 3) to 0 and checks that the fault is
// flagged exactly when the true bit is 1. When done it raises done and holds
// its check and failure counts, including one failure for each mechanism
// (idle, completion held off, direct compare, either add-one correction,
// fault-free check, detected fault) that never occurred.
module mmr_rca_sweep #(
  parameter int N = 16
) (
  output bit done,
  output int checks,
  output int failures
);
  localparam int NCELL = N / 4;
  localparam int FAULT_BIT = 12;

  logic [N-1:0]     a, b, sum;
  logic             cin, cout, carry_done;
  logic [NCELL-1:0] cel;
  logic [4:0]       tri_out1, tri_out0;
  logic             check_en, fault1, fault0;

  int n_idle = 0, n_notdone = 0, n_direct = 0, n_sel1 = 0, n_sel0 = 0;
  int n_pass = 0, n_detect = 0;
  bit fault_on = 0;

  mmr_rca #(.N(N)) dut (
    .a, .b, .cin, .cel, .carry_done,
    .sum, .cout, .tri_out1, .tri_out0, .check_en, .fault1, .fault0
  );


  // Carry into cell i of the fault-free adder.
  function automatic logic ref_cin(int i);
    logic [N:0] part;
    if (i == 0) return cin;
    part = ({1'b0, a} & (((N+1)'(1) << (4*i)) - 1))
         + ({1'b0, b} & (((N+1)'(1) << (4*i)) - 1)) + (N+1)'(cin);
    return part[4*i];
  endfunction

  // {carry-out, sum} of cell i, with the injected fault applied.
  function automatic logic [4:0] ref_res(int i);
    logic [4:0] r;
    r = 5'(a[4*i +: 4]) + 5'(b[4*i +: 4]) + 5'(ref_cin(i));
    if (fault_on && i == FAULT_BIT / 4) r[FAULT_BIT % 4] = 1'b0;
    return r;
  endfunction

  // Comparator model: mark the first pair of cells with equal operands.
  function automatic logic [NCELL-1:0] comparator();
    for (int i = 0; i < NCELL; i++)
      for (int j = i + 1; j < NCELL; j++)
        if (a[4*i +: 4] == a[4*j +: 4] && b[4*i +: 4] == b[4*j +: 4])
          return (NCELL'(1) << i) | (NCELL'(1) << j);
    return '0;
  endfunction

  task automatic check();
    logic [N:0] full;
    logic [4:0] e1, e0, rh, rl;
    logic       ch, cl, en;
    int hi, lo;
    #1;
    full = {1'b0, a} + {1'b0, b} + (N+1)'(cin);
    if (fault_on) full[FAULT_BIT] = 1'b0;
    checks++;
    if ({cout, sum} !== full) begin
      failures++;
      $display("FAIL sum a=%h b=%h cin=%0d", a, b, cin);
    end
    hi = 0; lo = 0;
    for (int i = NCELL - 1; i >= 0; i--) if (cel[i]) lo = i;
    for (int i = 0; i < NCELL; i++)      if (cel[i]) hi = i;
    en = carry_done && cel != 0;
    rh = ref_res(hi); ch = ref_cin(hi);
    rl = ref_res(lo); cl = ref_cin(lo);
    e1 = (!ch && cl) ? rh + 5'd1 : rh;
    e0 = (ch && !cl) ? rl + 5'd1 : rl;
    if (!en) begin e1 = '0; e0 = '0; end
    checks += 3;
    if (check_en !== en) begin
      failures++;
      $display("FAIL check_en cel=%h done=%0d", cel, carry_done);
    end
    if (tri_out1 !== e1 || tri_out0 !== e0) begin
      failures++;
      $display("FAIL tri_out cel=%h got %b %b want %b %b", cel, tri_out1, tri_out0, e1, e0);
    end
    if ((fault1 == fault0) !== (e1 != e0)) begin
      failures++;
      $display("FAIL checker cel=%h tri %b %b fault1/0=%b%b", cel, tri_out1, tri_out0, fault1, fault0);
    end
    // mechanism counters
    if (cel == 0) n_idle++;
    else if (!carry_done) n_notdone++;
    else begin
      if (ch == cl) n_direct++;
      else if (cl) n_sel1++;
      else n_sel0++;
      if (fault1 == fault0) n_detect++; else n_pass++;
    end
  endtask

  // Random operands; with probability 3/4 one cell slice is copied onto another.
  task automatic random_vector(int force_cell);
    int i, j;
    for (int k = 0; k < N; k += 32) begin
      a = N'({a, $urandom});
      b = N'({b, $urandom});
    end
    cin = 1'($urandom);
    carry_done = ($urandom % 10) != 0;
    if (force_cell >= 0 || ($urandom % 4) != 0) begin
      i = (force_cell >= 0) ? force_cell : int'($urandom % NCELL);
      do j = int'($urandom % NCELL); while (j == i);
      a[4*j +: 4] = a[4*i +: 4];
      b[4*j +: 4] = b[4*i +: 4];
    end
    cel = comparator();
    // in the fault phase only vectors that pair the faulty cell are useful
    if (force_cell >= 0 && !cel[force_cell]) begin
      cel = (NCELL'(1) << i) | (NCELL'(1) << j);
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    // Random fault-free operation.
    for (int n = 0; n < 20000; n++) begin
      random_vector(-1);
      check();
    end

    // Fault phase: sum bit 12 stuck at 0.
    fault_on = 1;
    force dut.u_rca.sum[FAULT_BIT] = 1'b0;

    for (int n = 0; n < 5000; n++) begin
      random_vector(FAULT_BIT / 4);
      check();
    end
    release dut.u_rca.sum[FAULT_BIT];
    fault_on = 0;

    $display("N=%0d mechanisms: idle=%0d completion_low=%0d direct=%0d add1_upper=%0d add1_lower=%0d no_fault=%0d fault_detected=%0d",
             N, n_idle, n_notdone, n_direct, n_sel1, n_sel0, n_pass, n_detect);
    if (n_idle == 0 || n_notdone == 0 || n_direct == 0 || n_sel1 == 0 ||
        n_sel0 == 0 || n_pass == 0 || n_detect == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    done = 1;
  end
endmodule
