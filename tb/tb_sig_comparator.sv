// tb_sig_comparator: the comparator must flag a match for the good signature
// (0xA3B, computed offline from the PE's test sequence), a mismatch for every
// single- and double-bit corruption of it, and for random other values.
module tb_sig_comparator;
  import fe_pkg::*;

  localparam logic [FIELDS-1:0] GOOD = 12'hA3B;
  logic [FIELDS-1:0] q;
  logic match;
  int checks = 0, failures = 0;

  sig_comparator dut (.q, .match);

  task automatic try(input logic [FIELDS-1:0] v);
    q = v; #1;
    checks++;
    if (match !== (v == GOOD)) begin failures++; $display("FAIL q=%h match=%b", v, match); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(GOOD);
    for (int a = 0; a < 12; a++) begin
      try(GOOD ^ (12'd1 << a));
      for (int b = a + 1; b < 12; b++) try(GOOD ^ (12'd1 << a) ^ (12'd1 << b));
    end
    for (int k = 0; k < 500; k++) try(12'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
