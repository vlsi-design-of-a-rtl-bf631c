// tb_fe_top: end-to-end test of the feature-extraction system at its default
// size (20 x 20 array, no parameter override).
//  1. Normal mode: five characters (A, B-like, C, U and random dots) stream
//     through with run held high. Every one of the 12 fields' row and column
//     projections is compared with a reference computed from the field
//     definitions. The clocks between the characters' first projections must
//     be 12(N+1), the first projection must arrive 3N+4 clocks after run,
//     and loading must overlap projection.
//  2. Self-test, fault free: all counts 0, chip accepted, in 2^7 + N + 3 clocks.
//  3. Self-test with one PE's signature corrupted (standing for any fault that
//     reaches its MISR): that PE's row and column count 1, chip still accepted
//     (a scattered fault is tolerated). Stuck-at faults inside a PE are
//     exercised by the single-PE testbench.
//  4. Self-test with two faulty PEs in one row, then in one column: chip
//     rejected; a clean test afterwards is accepted again.
// Mechanisms counted: overlapped load, field projection, self-test pass,
// fault detection, tolerated single fault, rejection.
module tb_fe_top;
  import fe_pkg::*;
  import fe_ref_pkg::*;

  localparam int N  = 20;
  localparam int CW = $clog2(N + 1);
  localparam int NCHAR = 5;

  logic clk = 0, rst_n = 0, run = 0, test_start = 0;
  logic col_req;
  logic [CW-1:0] col_idx;
  logic [N-1:0] row_in;
  logic field_valid;
  logic [3:0] field_idx;
  logic [N-1:0][CW-1:0] row_count, col_count;
  logic test_done, chip_reject, busy, char_capture;
  logic [N-1:0][N-1:0] pe_sig_ok;

  int checks = 0, failures = 0;
  int cycle = 0;
  bm_t chars [NCHAR];
  int load_ptr = 0, proj_ptr = 0;
  int cap_cycle [$];
  int first_fv [$];
  int run_cycle;
  int n_overlap = 0, n_fields = 0, n_pass = 0, n_detect = 0, n_tolerated = 0, n_reject = 0;

  fe_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  always_comb begin
    row_in = '0;
    if (col_req && load_ptr < NCHAR)
      for (int i = 0; i < N; i++) row_in[i] = chars[load_ptr][i][int'(col_idx)];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // Loader bookkeeping and the end of the stream.
  always @(posedge clk) begin
    if (col_req && col_idx == CW'(N - 1) && load_ptr == NCHAR - 1) run <= 0;
    if (col_req && col_idx == '0) load_ptr <= load_ptr + 1;
    if (char_capture) begin
      cap_cycle.push_back(cycle);
      if (dut.u_seq.pst != 2'd0) n_overlap++;   // projector not idle
    end
  end

  // Projection checker.
  always @(posedge clk) begin
    if (field_valid && proj_ptr < NCHAR) begin : chk
      vec_t rows, cols;
      bit ok;
      ok = 1;
      projections(chars[proj_ptr], N, int'(field_idx), rows, cols);
      for (int k = 0; k < N; k++)
        if (int'(row_count[k]) != rows[k] || int'(col_count[k]) != cols[k]) ok = 0;
      check(ok, $sformatf("char %0d field %0d projections", proj_ptr, field_idx));
      n_fields++;
      if (field_idx == 4'(FIELDS - 1)) first_fv.push_back(cycle);
      if (field_idx == 4'(0)) proj_ptr <= proj_ptr + 1;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Faulty PEs are modelled by corrupting their signature register at the end
  // of compaction (the effect of any fault that reaches the MISR).
  bit bad_3_5 = 0, bad_3_12 = 0, bad_9_15 = 0, bad_16_15 = 0;

  task automatic run_test(output int clocks, output int nfault_rows);
    int t0;
    @(negedge clk); test_start = 1; t0 = cycle;
    @(negedge clk); test_start = 0;
    while (dut.u_seq.tst != 3'd3) @(negedge clk);   // fail-flag load clock
    if (bad_3_5)  dut.u_array.g_row[3].g_col[5].u_pe.u_bilbo.q[0] = ~dut.u_array.g_row[3].g_col[5].u_pe.u_bilbo.q[0];
    if (bad_3_12) dut.u_array.g_row[3].g_col[12].u_pe.u_bilbo.q[7] = ~dut.u_array.g_row[3].g_col[12].u_pe.u_bilbo.q[7];
    if (bad_9_15)  dut.u_array.g_row[9].g_col[15].u_pe.u_bilbo.q[11] = ~dut.u_array.g_row[9].g_col[15].u_pe.u_bilbo.q[11];
    if (bad_16_15) dut.u_array.g_row[16].g_col[15].u_pe.u_bilbo.q[4] = ~dut.u_array.g_row[16].g_col[15].u_pe.u_bilbo.q[4];
    while (!test_done) @(negedge clk);
    clocks = cycle - t0;
    nfault_rows = 0;
    for (int k = 0; k < N; k++) nfault_rows += int'(row_count[k]);
    @(negedge clk);
  endtask

  initial begin
    int clocks, nf;
    for (int c = 0; c < NCHAR; c++) chars[c] = make_char(N, c, 32'(c * 7919 + 1));
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run = 1; run_cycle = cycle;
    wait (proj_ptr == NCHAR);
    @(negedge clk);
    check(n_fields == 12 * NCHAR, "all fields projected");
    for (int c = 1; c < first_fv.size(); c++)
      check(first_fv[c] - first_fv[c-1] == 12 * (N + 1),
            $sformatf("character period %0d", first_fv[c] - first_fv[c-1]));
    // run sampled + N load + N generation + capture + shift + N propagation + 1
    check(first_fv[0] - run_cycle == 3 * N + 4, $sformatf("first projection after %0d clocks", first_fv[0] - run_cycle));
    check(cap_cycle.size() == NCHAR, "captures");
    wait (!busy);
    repeat (2) @(negedge clk);

    // 2. fault-free self-test
    run_test(clocks, nf);
    // start clock + clear + 2^7 compaction + fail-flag load + N propagation
    check(clocks == 1 + 1 + TEST_CYCLES + 1 + N, $sformatf("test duration %0d", clocks));
    check(nf == 0 && !chip_reject, "fault-free array accepted");
    check(&pe_sig_ok, "every comparator passes");
    if (nf == 0 && !chip_reject) n_pass++;

    // 3. one faulty PE at row 3, column 5
    bad_3_5 = 1;
    run_test(clocks, nf);
    check(row_count[3] == 1 && col_count[5] == 1 && nf == 1,
          $sformatf("single fault located (row3=%0d col5=%0d total=%0d ok=%b)", row_count[3], col_count[5], nf, pe_sig_ok[3][5]));
    check(!pe_sig_ok[3][5], "comparator of the faulty PE fails");
    check(!chip_reject, "single fault tolerated");
    if (nf == 1) n_detect++;
    if (nf == 1 && !chip_reject) n_tolerated++;

    // 4. a second faulty PE in the same row
    bad_3_12 = 1;
    run_test(clocks, nf);
    check(row_count[3] == 2 && col_count[12] == 1, "two faults located");
    check(chip_reject, "clustered faults rejected");
    if (chip_reject) n_reject++;

    // 5. two faulty PEs in one column (rows 9 and 16, column 15), none in a shared row
    bad_3_5 = 0; bad_3_12 = 0; bad_9_15 = 1; bad_16_15 = 1;
    run_test(clocks, nf);
    check(col_count[15] == 2 && row_count[9] == 1 && row_count[16] == 1 && nf == 2, "column faults located");
    check(chip_reject, "column cluster rejected");
    if (chip_reject) n_reject++;

    // 6. faults gone again: accepted
    bad_9_15 = 0; bad_16_15 = 0;
    run_test(clocks, nf);
    check(nf == 0 && !chip_reject, "accepted after clean test");

    $display("mechanisms: overlapped_load=%0d fields=%0d test_pass=%0d detect=%0d tolerated=%0d reject=%0d",
             n_overlap, n_fields, n_pass, n_detect, n_tolerated, n_reject);
    check(n_overlap > 0, "overlapped load happened");
    check(n_fields > 0, "projection happened");
    check(n_pass > 0, "passing self-test happened");
    check(n_detect > 0, "fault detection happened");
    check(n_tolerated > 0, "single-fault tolerance happened");
    check(n_reject > 0, "rejection happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
