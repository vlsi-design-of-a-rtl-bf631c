// proj_counters: one bank of edge counters that turns the bit streams leaving
// one edge of the array into a projection vector (a histogram of one field).
//
// Counter k adds bits[k] on every clock with en high and is zeroed by clr
// (clr wins). After the n propagation clocks of one field, count[k] is the
// number of set bits in row k (right-edge bank) or column k (bottom-edge bank).
// The same bank counts the failing PEs per row or column after self-test;
// over1 is the acceptance rule used for that: it is high when any count
// exceeds 1, i.e. some row or column holds more than one faulty cell.
// The design places these counters outside the array chip; their width,
// enough for 0..N, is this implementation's choice.
module proj_counters #(
  parameter int unsigned N = 20,
  parameter int unsigned W = $clog2(N + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic                en,
  input  logic [N-1:0]        bits,
  output logic [N-1:0][W-1:0] count,
  output logic                over1
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else if (clr) count <= '0;
    else if (en) begin
      for (int k = 0; k < N; k++) count[k] <= count[k] + W'(bits[k]);
    end
  end

  always_comb begin
    over1 = 1'b0;
    for (int k = 0; k < N; k++) over1 |= (count[k] > W'(1));
  end

endmodule
