// tb_mod_lfsr: checks the input register in normal mode (parallel load, hold
// when not qualified, synchronous clear) and in test mode (from the cleared
// state, all 128 patterns appear exactly once in 128 clocks, and the register
// is back at zero after exactly 2^7 clocks). The expected test sequence is
// computed from the recurrence s(t) = s(t-4) xor s(t-7) xor [six previous bits zero].
module tb_mod_lfsr;
  import fe_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, en = 0, k1 = 1, k2 = 0;
  logic [IN_W-1:0] d_in = '0, q;
  int checks = 0, failures = 0;
  bit seen [128];
  logic [IN_W-1:0] model;

  mod_lfsr dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (q=%b)", what, q); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // normal mode
    @(negedge clk); en = 1; k1 = 1; k2 = 0; d_in = 7'b1010011;
    @(negedge clk); check(q == 7'b1010011, "parallel load K1");
    k1 = 0; k2 = 1; d_in = 7'b0101100;
    @(negedge clk); check(q == 7'b0101100, "parallel load K2");
    en = 0; d_in = 7'b1111111;
    @(negedge clk); check(q == 7'b0101100, "hold when not qualified");
    clr = 1;
    @(negedge clk); check(q == '0, "clear"); clr = 0;
    // test mode
    k1 = 0; k2 = 0; en = 1;
    model = '0;
    for (int t = 0; t < 128; t++) begin
      bit nb;
      check(q == model, $sformatf("test sequence step %0d", t));
      check(!seen[q], $sformatf("pattern %0d repeated", q));
      seen[q] = 1;
      nb = model[3] ^ model[6] ^ (model[5:0] == 6'd0);
      model = {model[5:0], nb};
      @(negedge clk);
    end
    check(q == '0, "back to zero after 128 clocks");
    begin
      int cnt = 0;
      for (int v = 0; v < 128; v++) cnt += seen[v];
      check(cnt == 128, "all 128 patterns generated");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
