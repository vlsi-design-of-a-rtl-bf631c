// tb_proj_counters: random bit streams into a bank of 8 counters; counts are
// compared with a running tally, clear and hold are checked, and over1 with
// the rule "some count above 1".
module tb_proj_counters;
  localparam int N = 8;
  localparam int W = $clog2(N + 1);
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [N-1:0] bits = '0;
  logic [N-1:0][W-1:0] count;
  logic over1;
  int checks = 0, failures = 0;
  int tally [N];

  proj_counters #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
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
    for (int round = 0; round < 20; round++) begin
      bit any;
      @(negedge clk); clr = 1; en = 1; bits = '1;
      @(negedge clk); clr = 0;
      foreach (tally[k]) tally[k] = 0;
      for (int c = 0; c < N; c++) begin
        if (round < 5)       bits = N'(1 << c);
        else if (round < 8)  bits = (c < 2) ? N'(1 << (round - 5)) : '0;  // one count of exactly 2
        else                 bits = N'($urandom);
        en = (c != 3) || (round % 2 == 0);
        if (en) foreach (tally[k]) tally[k] += bits[k];
        @(negedge clk);
      end
      en = 0;
      any = 0;
      for (int k = 0; k < N; k++) begin
        check(count[k] == W'(tally[k]), $sformatf("round %0d counter %0d", round, k));
        any |= (tally[k] > 1);
      end
      check(over1 == any, "over1");
      bits = '1;
      @(negedge clk);
      check(count[0] == W'(tally[0]), "hold without enable");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
