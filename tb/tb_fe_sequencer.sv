// tb_fe_sequencer: runs the controller alone (N = 5) and checks its schedule:
// N column requests per character with col_idx counting down, outerfield
// generation for N clocks, a K1K2 = 10 capture, 12 fields of one shift
// (K1K2 = 01 with the own-bit select) plus N counting clocks, field_valid in
// field order 11..0, a steady-state character period of 12(N+1) clocks with
// the next load overlapping the projection, and the self-test schedule
// (clear, 128 clocks with K1 = K2 = 0, one fail-flag load, N propagation).
module tb_fe_sequencer;
  import fe_pkg::*;

  localparam int N = 5;
  localparam int CW = $clog2(N + 1);
  logic clk = 0, rst_n = 0, run = 0, test_start = 0;
  pe_ctrl_t ctrl;
  logic col_req, cnt_clr, cnt_en, field_valid, test_done, capture, busy;
  logic [CW-1:0] col_idx;
  logic [3:0] field_idx;
  int checks = 0, failures = 0, cycle = 0;
  int n_colreq = 0, n_cap = 0, n_fv = 0, n_test_run = 0, n_shift = 0, n_cnt = 0;
  int fv_cycles [$];
  int exp_field = 11;
  int exp_col = N - 1;

  fe_sequencer #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cycle++;
    if (col_req) begin
      n_colreq++;
      check(int'(col_idx) == exp_col, "column order");
      exp_col = (exp_col == 0) ? N - 1 : exp_col - 1;
      check(ctrl.load && (ctrl.k1 | ctrl.k2), "load in normal mode");
    end
    if (capture) begin
      n_cap++;
      check(ctrl.k1 && !ctrl.k2 && ctrl.bilbo_en, "capture code");
    end
    if (ctrl.prop_sel && !ctrl.k1 && ctrl.k2) begin
      n_shift++;
      check(ctrl.bilbo_en && cnt_clr, "field shift");
    end
    if (cnt_en) n_cnt++;
    if (!ctrl.k1 && !ctrl.k2 && ctrl.lfsr_en) begin
      n_test_run++;
      check(ctrl.bilbo_en, "test run");
    end
    if (field_valid) begin
      n_fv++;
      check(int'(field_idx) == exp_field, "field order");
      exp_field = (exp_field == 0) ? 11 : exp_field - 1;
      if (field_idx == 4'd11) fv_cycles.push_back(cycle);
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); run = 1;
    // let three characters through
    wait (n_colreq == 3 * N);
    @(negedge clk); run = 0;
    wait (!busy);
    repeat (2) @(negedge clk);   // last field_valid follows busy by one clock
    check(n_cap == 3, "three captures");
    check(n_fv == 36, "36 fields reported");
    check(n_shift == 36, "36 BILBO shifts");
    check(n_cnt == 36 * N, "counting clocks");
    for (int c = 1; c < fv_cycles.size(); c++)
      check(fv_cycles[c] - fv_cycles[c-1] == 12 * (N + 1), "character period 12(N+1)");
    // self-test
    n_cnt = 0;
    test_start = 1; t0 = cycle;
    @(negedge clk); test_start = 0;
    wait (test_done);
    @(negedge clk);
    check(n_test_run == TEST_CYCLES, $sformatf("128 compaction clocks, got %0d", n_test_run));
    check(n_cnt == N, "N propagation clocks");
    check(cycle - t0 == TEST_CYCLES + N + 3, $sformatf("test length %0d", cycle - t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
