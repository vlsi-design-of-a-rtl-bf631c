// sig_comparator: checks a PE's 12-bit self-test signature against the
// good-machine signature.
//
// In the chip the good signature is not stored: it is wired in by taking, for
// every bit where the good signature is 1, the complemented register output,
// so that a single precharged 12-input NOR (discharged by any mismatching bit)
// gives F = 1 exactly when all twelve bits match. Here the same function is
// written as the NOR of (q XOR GOOD_SIG); GOOD_SIG is a parameter fixed at
// build time, the counterpart of the wiring.
//
// The default GOOD_SIG is the signature of this implementation's PE: 128
// patterns from the cleared modified LFSR, through the PPL, compacted by the
// BILBO from zero. It differs from the value quoted for the original chip
// (110111011001) because the MISR polynomial and bit ordering of that chip are
// not known. Combinational.
module sig_comparator
  import fe_pkg::*;
#(
  parameter logic [FIELDS-1:0] GOOD_SIG = 12'hA3B
) (
  input  logic [FIELDS-1:0] q,
  output logic              match
);

  always_comb match = ~(|(q ^ GOOD_SIG));

endmodule
