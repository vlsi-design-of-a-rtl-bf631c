// pe_array: the n x n square mesh of processing elements.
//
// PE(i,j) sits at row i (top to bottom) and column j (left to right) and talks
// only to its four nearest neighbours. Row i of the bit map enters at the left
// edge on row_in[i], one column per load clock; the row projections leave at
// the right edge on h_out[i] and the column projections at the bottom edge on
// v_out[j], one bit per clock. The control bundle is broadcast to all PEs.
//
// Edges: a missing neighbour's outerfield bit reads 1 (the outside of the
// array is background reached from that side), a missing neighbour's pattern
// bit reads 0, and zeros shift into the propagating registers at the left and
// top. The left-column pattern input is the bit-map line while ctrl.load is
// high and 0 otherwise, so P_h of column 1 sees background after loading.
//
// The outerfield outputs of the edge PEs that face outwards (G^t of the
// bottom row, G^b of the top row, and likewise at the side columns) have no
// reader; they stay in the mesh signals so that every PE is identical.
//
// sig_ok[i][j] exposes each PE's comparator output for observation; the
// design's own path for the test result is through the propagating registers.
module pe_array
  import fe_pkg::*;
#(
  parameter int unsigned N = 20,
  parameter logic [FIELDS-1:0] GOOD_SIG = 12'hA3B
) (
  input  logic     clk,
  input  logic     rst_n,
  input  pe_ctrl_t ctrl,
  input  logic [N-1:0] row_in,
  output logic [N-1:0] h_out,
  output logic [N-1:0] v_out,
  output logic [N-1:0][N-1:0] sig_ok
);

  logic [N-1:0][N-1:0] p, gl, gr, gt, gb, fh, fv;

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      logic p_left, p_up, gl_in, gr_in, gt_in, gb_in, fh_in, fv_in;

      if (j == 0) begin : g_left_edge
        assign p_left = ctrl.load & row_in[i];
        assign gl_in  = 1'b1;
        assign fh_in  = 1'b0;
      end else begin : g_left_nb
        assign p_left = p[i][j-1];
        assign gl_in  = gl[i][j-1];
        assign fh_in  = fh[i][j-1];
      end

      if (i == 0) begin : g_top_edge
        assign p_up  = 1'b0;
        assign gt_in = 1'b1;
        assign fv_in = 1'b0;
      end else begin : g_top_nb
        assign p_up  = p[i-1][j];
        assign gt_in = gt[i-1][j];
        assign fv_in = fv[i-1][j];
      end

      if (j == N-1) begin : g_right_edge
        assign gr_in = 1'b1;
      end else begin : g_right_nb
        assign gr_in = gr[i][j+1];
      end

      if (i == N-1) begin : g_bottom_edge
        assign gb_in = 1'b1;
      end else begin : g_bottom_nb
        assign gb_in = gb[i+1][j];
      end

      pe #(.GOOD_SIG(GOOD_SIG)) u_pe (
        .clk, .rst_n, .ctrl,
        .p_left, .p_up, .gl_in, .gr_in, .gt_in, .gb_in, .fh_in, .fv_in,
        .p_q   (p[i][j]),
        .gl_q  (gl[i][j]),
        .gr_q  (gr[i][j]),
        .gt_q  (gt[i][j]),
        .gb_q  (gb[i][j]),
        .fh_q  (fh[i][j]),
        .fv_q  (fv[i][j]),
        .sig_ok(sig_ok[i][j])
      );
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_edge_out
    assign h_out[k] = fh[k][N-1];
    assign v_out[k] = fv[N-1][k];
  end

endmodule
