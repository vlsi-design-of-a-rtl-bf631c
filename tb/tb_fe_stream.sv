// tb_fe_stream: sustained-throughput run of the feature-extraction system at
// its default 20 x 20 size, the resolution the recognition algorithm works at.
//  1. 36 characters, as many as an alphanumeric set of 26 letters and 10
//     digits (drawn shapes A, B-like, C, U, sparse random dots and dense
//     random blobs, in turn), stream through with run held high. All 12 fields' row
//     and column projections of every character are compared with the
//     reference computed from the field definitions.
//  2. Every character after the first must leave 12(N+1) = 252 clocks after
//     the previous one, and every capture after the first must happen while
//     the previous character is still being projected (load overlapped).
//     At 25 MHz this period gives about 99,000 characters per second.
//  3. After the stream drains, a self-test runs, and then one more character
//     is processed on its own: its projections must be right (nothing left
//     over from the test) and arrive 3N+4 clocks after run.
// Mechanisms counted: overlapped load, field projection, mode switch from
// test back to normal.
module tb_fe_stream;
  import fe_pkg::*;
  import fe_ref_pkg::*;

  localparam int N  = 20;
  localparam int CW = $clog2(N + 1);
  localparam int NCHAR = 37;          // 36 streamed + 1 after the self-test
  localparam int NSTREAM = 36;

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
  int load_ptr = 0, proj_ptr = 0, load_stop = NSTREAM;
  int first_fv [$];
  int n_overlap = 0, n_fields = 0, n_switch = 0;

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

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Loader bookkeeping: stop requesting after the last column of a batch.
  always @(posedge clk) begin
    if (col_req && col_idx == CW'(N - 1) && load_ptr == load_stop - 1) run <= 0;
    if (col_req && col_idx == '0) load_ptr <= load_ptr + 1;
    if (char_capture && dut.u_seq.pst != 2'd0) n_overlap++;
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
    int t_run;
    for (int c = 0; c < NCHAR; c++) begin
      if (c % 6 < 5) chars[c] = make_char(N, c % 6, 32'(c * 104729 + 17));
      else
        for (int i = 0; i < MAXN; i++)
          for (int j = 0; j < MAXN; j++)
            chars[c][i][j] = (i < N && j < N) ? bit'($urandom_range(0, 1)) : 1'b0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1-2. the stream
    run = 1;
    wait (proj_ptr == NSTREAM);
    check(first_fv.size() == NSTREAM, "one projection set per character");
    for (int c = 1; c < first_fv.size(); c++)
      check(first_fv[c] - first_fv[c-1] == 12 * (N + 1),
            $sformatf("character %0d period %0d", c, first_fv[c] - first_fv[c-1]));
    check(n_overlap == NSTREAM - 1, $sformatf("overlapped loads %0d", n_overlap));
    check(first_fv[NSTREAM-1] - first_fv[0] == (NSTREAM - 1) * 252,
          "36 characters in 35 periods of 252 clocks");
    wait (!busy);
    repeat (2) @(negedge clk);

    // 3. self-test, then one character alone
    test_start = 1;
    @(negedge clk);
    test_start = 0;
    while (!test_done) @(negedge clk);
    @(negedge clk);
    check(!chip_reject, "self-test passes between character batches");
    load_stop = NCHAR;
    run = 1; t_run = cycle;
    wait (proj_ptr == NCHAR);
    check(first_fv[NCHAR-1] - t_run == 3 * N + 4,
          $sformatf("first projection after self-test in %0d clocks", first_fv[NCHAR-1] - t_run));
    if (first_fv.size() == NCHAR) n_switch++;

    $display("mechanisms: overlapped_load=%0d fields=%0d test_to_normal=%0d", n_overlap, n_fields, n_switch);
    check(n_fields == 12 * NCHAR, "all fields projected");
    check(n_overlap > 0, "overlapped load happened");
    check(n_switch > 0, "switch from test back to normal mode happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
