// mod_lfsr: the 7-bit input register of a processing element, which doubles
// as the modified LFSR that generates the exhaustive self-test patterns.
//
// Normal mode (K1 or K2 high): every enabled clock the register takes the
// seven bits on d_in in parallel; the PE computes those bits (pattern shift,
// neighbour pattern bits, outerfield wavefront).
// Test mode (K1 = K2 = 0): the stages form a shift chain, stage 1 -> stage 7,
// fed back into stage 1 by XOR(stage 4, stage 7, NOR(stages 1..6)). The XOR
// pair realises the characteristic polynomial x^7 + x^4 + 1, which is
// primitive, so the plain LFSR cycles through all 127 non-zero states; the
// six-input NOR is the non-linear element that splices the all-zero state into
// that cycle, so starting from the cleared state all 2^7 = 128 patterns appear
// in 128 clocks before the sequence repeats. Only two feedback taps and no XOR
// between stages, as in the chip; which stages the taps sit on is taken from
// the exponents of the polynomial.
//
// clr is a synchronous clear (the chip uses an asynchronous clear transistor on
// the slave latch; this design keeps all resets synchronous except rst_n).
// en is the clock qualifier: with en low the register holds.
module mod_lfsr
  import fe_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic            en,
  input  logic            k1,
  input  logic            k2,
  input  logic [IN_W-1:0] d_in,
  output logic [IN_W-1:0] q
);

  logic test_mode;
  logic nor6, fb;

  always_comb begin
    test_mode = ~(k1 | k2);
    nor6      = ~(|q[IN_W-2:0]);
    fb        = q[3] ^ q[6] ^ nor6;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          q <= '0;
    else if (clr)        q <= '0;
    else if (en) begin
      if (test_mode)     q <= {q[IN_W-2:0], fb};
      else               q <= d_in;
    end
  end

endmodule
