// tb_mmr_rca: end-to-end self-check of the 64-bit MMR fault-detecting adder
// at its default size.
//
// The testbench models the external comparator: it looks for the first pair
// of cells (lowest i, then lowest j > i) whose a and b slices are both equal
// and marks exactly those two cells in cel. Operands are random, with one cell
// slice often copied onto another so that pairs occur. For every vector it
// checks the sum, the two buffer outputs and the checker outputs against a
// reference computed here from a + b + cin:
//   * the buffer outputs are the two cells' {carry-out, sum} results, the one
//     with carry-in 0 incremented when the carry-ins differ, or 0 when the
//     check is disabled;
//   * fault1/fault0 must be complementary unless the two buffer outputs
//     differ.
// Phase 2 injects a stuck-at-0 fault on sum bit 12 (bit 0 of cell 3) with a
// force and pairs cell 3 with other cells; the fault must be flagged exactly
// when the true bit is 1. Two directed vectors replay the two operating
// points shown for this adder: cells 1 and 15 paired with result 01011 and no
// fault, and cells 0 and 3 paired with the stuck-at-0 fault on sum bit 12.
// Each mechanism (idle, completion held off, direct compare, upper and lower
// add-one correction, fault-free check, detected fault) is counted and a
// failure is counted for any that never occurred.
module tb_mmr_rca;
  localparam int N     = 64;
  localparam int NCELL = N / 4;
  localparam int FAULT_BIT = 12;

  logic [N-1:0]     a, b, sum;
  logic             cin, cout, carry_done;
  logic [NCELL-1:0] cel;
  logic [4:0]       tri_out1, tri_out0;
  logic             check_en, fault1, fault0;

  int checks = 0, failures = 0;
  int n_idle = 0, n_notdone = 0, n_direct = 0, n_sel1 = 0, n_sel0 = 0;
  int n_pass = 0, n_detect = 0;
  bit fault_on = 0;

  mmr_rca dut (
    .a, .b, .cin, .cel, .carry_done,
    .sum, .cout, .tri_out1, .tri_out0, .check_en, .fault1, .fault0
  );

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
    a = {$urandom, $urandom};
    b = {$urandom, $urandom};
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
    // Directed: cells 1 and 15 paired, both carry-ins 0, result 01011.
    a = {$urandom, $urandom};
    b = {$urandom, $urandom};
    cin = 1'b0; carry_done = 1'b1;
    a[63:60] = 4'b1001; b[63:60] = 4'b0010;
    a[7:4]   = 4'b1001; b[7:4]   = 4'b0010;
    a[3:0]   = 4'b0001; b[3:0]   = 4'b0000;   // no carry into cell 1
    a[59:56] = 4'b0000; b[59:56] = 4'b0011;   // no carry into cell 15
    cel = 16'b1000_0000_0000_0010;
    check();
    checks++;
    if (tri_out1 !== 5'b01011 || tri_out0 !== 5'b01011 || fault1 == fault0) begin
      failures++;
      $display("FAIL directed pair 1/15: %b %b %b%b", tri_out1, tri_out0, fault1, fault0);
    end

    // Random fault-free operation.
    for (int n = 0; n < 20000; n++) begin
      random_vector(-1);
      check();
    end

    // Fault phase: sum bit 12 stuck at 0.
    fault_on = 1;
    force dut.u_rca.sum[FAULT_BIT] = 1'b0;

    // Directed: cells 0 and 3 paired, true sum[12] = 1.
    a = {$urandom, $urandom};
    b = {$urandom, $urandom};
    cin = 1'b0; carry_done = 1'b1;
    a[3:0]   = 4'b0101; b[3:0]   = 4'b0000;
    a[15:12] = 4'b0101; b[15:12] = 4'b0000;
    a[11:8]  = 4'b0000; b[11:8]  = 4'b0000;   // no carry into cell 3
    cel = 16'b0000_0000_0000_1001;
    check();
    checks++;
    if (fault1 != fault0) begin
      failures++;
      $display("FAIL directed pair 0/3 fault not flagged");
    end

    for (int n = 0; n < 5000; n++) begin
      random_vector(FAULT_BIT / 4);
      check();
    end
    release dut.u_rca.sum[FAULT_BIT];
    fault_on = 0;

    $display("mechanisms: idle=%0d completion_low=%0d direct=%0d add1_upper=%0d add1_lower=%0d no_fault=%0d fault_detected=%0d",
             n_idle, n_notdone, n_direct, n_sel1, n_sel0, n_pass, n_detect);
    if (n_idle == 0 || n_notdone == 0 || n_direct == 0 || n_sel1 == 0 ||
        n_sel0 == 0 || n_pass == 0 || n_detect == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
