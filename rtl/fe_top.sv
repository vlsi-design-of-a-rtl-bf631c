// fe_top: the feature-extraction system around the processor array.
//
// A character arrives as an N x N binary bit map, one column per clock. The
// array computes, in every pixel at once, the pattern, inner (bubble), four
// open (concavity), horizontal-line, vertical-line and four corner fields,
// then shifts each of the twelve fields out to its right and bottom edges,
// where counters turn them into row and column projection vectors for a host
// processor. A built-in self-test runs every PE through all 128 input patterns,
// compares each PE's signature with the good one and counts the failing PEs per
// row and column; chip_reject is set when any row or column has more than one.
//
// Interface: run / test_start start work; while col_req is high the host
// drives row_in[i] = bit map(row i, column col_idx) in the same clock. Each
// field_valid pulse presents row_count (horizontal projection, one count per
// row) and col_count (vertical projection, one per column) of field field_idx
// (fe_pkg::field_e order from bit 11 down: P, I, O^t, O^b, O^r, O^l, H, V,
// C^rb, C^lb, C^rt, C^lt). test_done pulses with the fault counts in
// row_count / col_count; chip_reject is valid from the next clock on.
// pe_sig_ok shows each PE's comparator output, for observation only;
// char_capture marks the clock in which a loaded character enters the BILBOs.
// Throughput: one character every 12(N+1) clocks.
module fe_top
  import fe_pkg::*;
#(
  parameter int unsigned N  = 20,
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 run,
  input  logic                 test_start,
  output logic                 col_req,
  output logic [CW-1:0]        col_idx,
  input  logic [N-1:0]         row_in,
  output logic                 field_valid,
  output logic [3:0]           field_idx,
  output logic [N-1:0][CW-1:0] row_count,
  output logic [N-1:0][CW-1:0] col_count,
  output logic                 test_done,
  output logic                 chip_reject,
  output logic                 busy,
  output logic [N-1:0][N-1:0]  pe_sig_ok,
  output logic                 char_capture
);

  pe_ctrl_t ctrl;
  logic cnt_clr, cnt_en;
  logic [N-1:0] h_out, v_out;
  logic row_over1, col_over1;

  fe_sequencer #(.N(N), .CW(CW)) u_seq (
    .clk, .rst_n, .run, .test_start,
    .ctrl, .col_req, .col_idx, .cnt_clr, .cnt_en,
    .field_valid, .field_idx, .test_done, .capture(char_capture), .busy
  );

  pe_array #(.N(N)) u_array (
    .clk, .rst_n, .ctrl, .row_in, .h_out, .v_out, .sig_ok(pe_sig_ok)
  );

  proj_counters #(.N(N), .W(CW)) u_row_cnt (
    .clk, .rst_n, .clr(cnt_clr), .en(cnt_en), .bits(h_out), .count(row_count), .over1(row_over1)
  );

  proj_counters #(.N(N), .W(CW)) u_col_cnt (
    .clk, .rst_n, .clr(cnt_clr), .en(cnt_en), .bits(v_out), .count(col_count), .over1(col_over1)
  );

  // Acceptance rule: reject when any row or column holds more than one faulty PE.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         chip_reject <= 1'b0;
    else if (test_done) chip_reject <= row_over1 | col_over1;
  end

endmodule
