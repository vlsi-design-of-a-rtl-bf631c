// tb_pe_array: an 8 x 8 array driven by hand-written control sequences.
// For several characters it loads the bit map column by column, generates the
// outerfields for N clocks, captures the fields, and projects each of the 12
// fields (one shift plus N propagation clocks), tallying the bits that leave
// the right and bottom edges. The tallies are compared with the reference
// projections. A self-test then must leave every comparator passing and shift
// out only zeros.
module tb_pe_array;
  import fe_pkg::*;
  import fe_ref_pkg::*;

  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  pe_ctrl_t ctrl = '0;
  logic [N-1:0] row_in = '0, h_out, v_out;
  logic [N-1:0][N-1:0] sig_ok;
  int checks = 0, failures = 0;

  pe_array #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_char(input bm_t p, input int id);
    vec_t rows, cols;
    int hr [N], vc [N];
    // load: last column first
    for (int c = 0; c < N; c++) begin
      ctrl = '0; ctrl.k2 = 1; ctrl.lfsr_en = 1; ctrl.load = 1;
      for (int i = 0; i < N; i++) row_in[i] = p[i][N - 1 - c];
      @(negedge clk);
    end
    row_in = '0;
    ctrl = '0; ctrl.k2 = 1; ctrl.lfsr_en = 1;
    repeat (N) @(negedge clk);
    ctrl = '0; ctrl.k1 = 1; ctrl.bilbo_en = 1;
    @(negedge clk);
    for (int f = FIELDS - 1; f >= 0; f--) begin
      ctrl = '0; ctrl.k2 = 1; ctrl.bilbo_en = 1; ctrl.prop_en = 1; ctrl.prop_sel = 1;
      @(negedge clk);
      for (int k = 0; k < N; k++) begin hr[k] = 0; vc[k] = 0; end
      ctrl = '0; ctrl.k2 = 1; ctrl.prop_en = 1;
      for (int s = 0; s < N; s++) begin
        for (int k = 0; k < N; k++) begin hr[k] += h_out[k]; vc[k] += v_out[k]; end
        @(negedge clk);
      end
      projections(p, N, f, rows, cols);
      for (int k = 0; k < N; k++) begin
        check(hr[k] == rows[k], $sformatf("char %0d field %0d row %0d: %0d vs %0d", id, f, k, hr[k], rows[k]));
        check(vc[k] == cols[k], $sformatf("char %0d field %0d col %0d: %0d vs %0d", id, f, k, vc[k], cols[k]));
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < 7; c++) do_char(make_char(N, c, 32'(c * 31 + 5)), c);
    // self-test
    ctrl = '0; ctrl.clr = 1; @(negedge clk);
    ctrl = '0; ctrl.lfsr_en = 1; ctrl.bilbo_en = 1;
    repeat (TEST_CYCLES) @(negedge clk);
    ctrl = '0;
    check(&sig_ok, "all comparators pass");
    ctrl.prop_en = 1; ctrl.prop_sel = 1; @(negedge clk);
    ctrl.prop_sel = 0;
    for (int s = 0; s < N; s++) begin
      check(h_out == '0 && v_out == '0, "no fault flags");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
