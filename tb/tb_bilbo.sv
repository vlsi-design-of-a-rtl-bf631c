// tb_bilbo: checks the four BILBO modes against a polynomial-arithmetic model:
// parallel load, shift-register order of the serial output (bit 11 first),
// clear, hold without qualifier, and MISR compaction of random data, where the
// model multiplies the state by x modulo x^12 + x^6 + x^4 + x + 1 and adds the input.
module tb_bilbo;
  import fe_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, en = 0, k1 = 0, k2 = 0;
  logic [FIELDS-1:0] d = '0, q;
  logic so;
  int checks = 0, failures = 0;
  logic [12:0] pmod = 13'b1_0000_0101_0011;
  logic [FIELDS-1:0] model;

  bilbo dut (.*);

  always #5 clk = ~clk;

  function automatic logic [FIELDS-1:0] mulx(input logic [FIELDS-1:0] a);
    logic [12:0] t;
    t = {a, 1'b0};
    if (t[12]) t = t ^ pmod;
    return t[11:0];
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (q=%h)", what, q); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); en = 1; k1 = 1; k2 = 0; d = 12'hB5C;
    @(negedge clk); check(q == 12'hB5C, "parallel load");
    k1 = 0; k2 = 1; d = 12'hFFF;  // data must be ignored in shift mode
    for (int b = 11; b >= 0; b--) begin
      check(so == model_bit(12'hB5C, b), $sformatf("serial bit %0d", b));
      @(negedge clk);
    end
    en = 0; k1 = 1; k2 = 0; d = 12'h123;
    @(negedge clk); check(q == dut.q, "hold");
    en = 1; clr = 1;
    @(negedge clk); check(q == '0, "clear"); clr = 0;
    // K1 = K2 = 1 also clears
    k1 = 1; k2 = 0; d = 12'h5A5; @(negedge clk);
    k1 = 1; k2 = 1; @(negedge clk); check(q == '0, "clear mode 11");
    // MISR
    k1 = 0; k2 = 0; model = '0;
    for (int t = 0; t < 200; t++) begin
      d = 12'($urandom);
      model = mulx(model) ^ d;
      @(negedge clk);
      check(q == model, $sformatf("MISR step %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit model_bit(input logic [FIELDS-1:0] v, input int b);
    return v[b];
  endfunction
endmodule
