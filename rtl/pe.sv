// pe: one processing element (unit cell) of the feature-extraction array,
// responsible for one pixel of the character bit map.
//
// Datapath: input register (mod_lfsr, 7 bits) -> PPL (12 feature bits) ->
// BILBO (12 bits) -> two propagating registers, one shifting towards the right
// edge (row projection), one towards the bottom edge (column projection).
// A comparator checks the BILBO signature after self-test.
//
// Normal mode, per enabled clock, the input register takes:
//   P    <= load ? P(i,j-1) : P          bit map shifts in from the left
//   P_h  <= P(i,j-1),  P_v <= P(i-1,j)   neighbour pattern bits
//   G^x  <= ~P & G^x(neighbour on side x) for x = l, r, t, b
// The last line is the outerfield wavefront: a pixel is reached from side x
// when it is background and its neighbour on that side was reached; the array
// ties the missing neighbours at the edges to 1, so after n clocks with the
// pattern still every G^x has settled (the design's recurrence
// G^l(i,j) = NOR(P(i,j), ~G^l(i,j-1)) and its mirror images).
// Test mode (K1 = K2 = 0): the input register runs as the modified LFSR and
// the BILBO as MISR, so the PPL sees all 128 input patterns.
//
// Propagating registers: with prop_sel they load the PE's own bit, which is
// the BILBO serial output when K2 = 1 (normal projection) and the fail flag
// (signature mismatch) otherwise (test result); without prop_sel they shift
// from the left / upper neighbour. Each register has its own clock qualifier
// (an enable line of the control bundle). Timing: everything is on clk; the
// PPL and comparator are combinational between registers.
module pe
  import fe_pkg::*;
#(
  parameter logic [FIELDS-1:0] GOOD_SIG = 12'hA3B
) (
  input  logic     clk,
  input  logic     rst_n,
  input  pe_ctrl_t ctrl,
  input  logic     p_left,    // P of the left neighbour (bit-map input at column 1)
  input  logic     p_up,      // P of the upper neighbour
  input  logic     gl_in,     // G^l of the left neighbour
  input  logic     gr_in,     // G^r of the right neighbour
  input  logic     gt_in,     // G^t of the upper neighbour
  input  logic     gb_in,     // G^b of the lower neighbour
  input  logic     fh_in,     // propagating register of the left neighbour
  input  logic     fv_in,     // propagating register of the upper neighbour
  output logic     p_q,
  output logic     gl_q,
  output logic     gr_q,
  output logic     gt_q,
  output logic     gb_q,
  output logic     fh_q,
  output logic     fv_q,
  output logic     sig_ok     // comparator output F: 1 = signature matches
);

  logic [IN_W-1:0]   in_d, in_q;
  logic [FIELDS-1:0] fields, bq;
  logic              bso, own;

  always_comb begin
    in_d       = '0;
    in_d[S_P]  = ctrl.load ? p_left : in_q[S_P];
    in_d[S_PH] = p_left;
    in_d[S_PV] = p_up;
    in_d[S_GL] = ~in_q[S_P] & gl_in;
    in_d[S_GR] = ~in_q[S_P] & gr_in;
    in_d[S_GT] = ~in_q[S_P] & gt_in;
    in_d[S_GB] = ~in_q[S_P] & gb_in;
  end

  mod_lfsr u_lfsr (
    .clk, .rst_n,
    .clr  (ctrl.clr),
    .en   (ctrl.lfsr_en),
    .k1   (ctrl.k1),
    .k2   (ctrl.k2),
    .d_in (in_d),
    .q    (in_q)
  );

  ppl u_ppl (.in_q(in_q), .fields(fields));

  bilbo u_bilbo (
    .clk, .rst_n,
    .clr (ctrl.clr),
    .en  (ctrl.bilbo_en),
    .k1  (ctrl.k1),
    .k2  (ctrl.k2),
    .d   (fields),
    .q   (bq),
    .so  (bso)
  );

  sig_comparator #(.GOOD_SIG(GOOD_SIG)) u_cmp (.q(bq), .match(sig_ok));

  always_comb own = ctrl.k2 ? bso : ~sig_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fh_q <= 1'b0;
      fv_q <= 1'b0;
    end else if (ctrl.prop_en) begin
      fh_q <= ctrl.prop_sel ? own : fh_in;
      fv_q <= ctrl.prop_sel ? own : fv_in;
    end
  end

  always_comb begin
    p_q  = in_q[S_P];
    gl_q = in_q[S_GL];
    gr_q = in_q[S_GR];
    gt_q = in_q[S_GT];
    gb_q = in_q[S_GB];
  end

endmodule
