// bilbo: 12-bit built-in logic block observer at the output of a PE's PPL.
//
// Two broadcast lines select the mode, as in the design:
//   K1 K2 = 1 0  parallel load: the register captures the 12 field bits
//   K1 K2 = 0 1  shift register: the PPL inputs are forced low (the chip does
//                this with one pull-down transistor per PPL output), the
//                feedback is cut and the register shifts towards bit 11, which
//                is the serial output
//   K1 K2 = 0 0  MISR: the shifted register plus the 12 PPL outputs, compacting
//                one 12-bit response per clock into the test signature
//   K1 K2 = 1 1  clear (not used by the design; this implementation's choice)
// All modes are one formula: next = (K1 ? 0 : shift(q)) ^ (K2 ? 0 : d), where
// shift(q) includes the feedback only in MISR mode. The feedback divides by
// the primitive polynomial x^12 + x^6 + x^4 + x + 1 in internal-XOR form. The design does not give its MISR polynomial; this
// one is this implementation's choice, and the good-machine signature
// (sig_comparator) follows from it.
//
// en is the clock qualifier, clr a synchronous clear. so = q[11]; in shift
// mode the bits leave in the order q[11], q[10], ..., q[0].
module bilbo
  import fe_pkg::*;
#(
  parameter logic [FIELDS-1:0] POLY = 12'b0000_0101_0011  // x^6 + x^4 + x + 1 taps
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              en,
  input  logic              k1,
  input  logic              k2,
  input  logic [FIELDS-1:0] d,
  output logic [FIELDS-1:0] q,
  output logic              so
);

  logic [FIELDS-1:0] shifted, gated_d, nxt;

  always_comb begin
    shifted = {q[FIELDS-2:0], 1'b0} ^ ((q[FIELDS-1] && !k2) ? POLY : '0);
    gated_d = k2 ? '0 : d;
    nxt     = (k1 ? '0 : shifted) ^ gated_d;
    so      = q[FIELDS-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (clr)  q <= '0;
    else if (en)   q <= nxt;
  end

endmodule
