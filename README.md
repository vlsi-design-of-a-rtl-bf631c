# Testable processor array for character feature extraction

A scanned character is a small binary picture, here 20 × 20 pixels. To
recognise it, you describe it by twelve *fields*, which are binary maps the
same size as the picture. Examples are "this pixel belongs to the stroke", "this
background pixel is enclosed on all sides (a hole)" and "this background pixel
is open only towards the bottom (a concavity)". Each field is then reduced to
two projection vectors: how many of its pixels are set in every row and in
every column. A classifier on a host processor works from those 12 × 2
histograms.

Every field bit of a pixel depends only on that pixel, its left and upper
neighbours, and four "outerfield" bits. Each outerfield bit says whether the
pixel can be reached from one edge of the picture through background. That
locality allows one small processing element (PE) per pixel, all running the
same broadcast control. The design has three parts:

- an n × n mesh of identical PEs (n = 20), wired only to their north, south,
  east and west neighbours;
- a sequencer that drives the broadcast control lines;
- edge counters that turn the shifted-out fields into projection vectors.

Each PE also tests itself. Its input register doubles as a pattern generator
and its output register as a signature compactor, so the whole array tests
itself in 2^7 + n clocks. The test result is counted by the same edge counters,
row by row and column by column. The chip is rejected when any row or column
holds more than one faulty PE. A few scattered faulty pixels change the
histograms little, but a cluster could change the character's global features.

## Fields

For the pixel in row i, column j, write P for its pattern bit (1 = ink) and
P_h, P_v for the pattern bits of its left and upper neighbours. Write
G^l, G^r, G^t, G^b for its outerfields: 1 when the pixel is background and
connected to the left, right, top or bottom edge by a straight run of
background. The PPL (a NOR plane, see below) computes:

| bit | field | meaning | equation |
|---|---|---|---|
| 11 | P | pattern | P |
| 10 | I | inner field (hole) | NOR(P, G^l, G^r, G^t, G^b) |
| 9 | O^t | open only to the top | NOR(P, ~G^t, G^l, G^r, G^b) |
| 8 | O^b | open only to the bottom | NOR(P, ~G^b, G^l, G^r, G^t) |
| 7 | O^r | open only to the right | NOR(P, ~G^r, G^l, G^t, G^b) |
| 6 | O^l | open only to the left | NOR(P, ~G^l, G^r, G^t, G^b) |
| 5 | H | horizontal stroke | NOR(~P, ~P_h) |
| 4 | V | vertical stroke | NOR(~P, ~P_v) |
| 3 | C^rb | right-bottom corner | NOR(~G^r, ~G^b) |
| 2 | C^lb | left-bottom corner | NOR(~G^l, ~G^b) |
| 1 | C^rt | right-top corner | NOR(~G^r, ~G^t) |
| 0 | C^lt | left-top corner | NOR(~G^l, ~G^t) |

A corner field is set on background reached from both sides of the corner, so
a round corner of the character leaves a patch of it while a square corner at
the frame leaves none. The bit numbers are the order used everywhere in the RTL
(`fe_pkg::field_e`).
Bit 11 leaves the PE first during projection.

## The processing element

```
 neighbours ──► input register (7) ──► PPL ──► BILBO (12) ──► propagating regs ──► right / down
                 P_h P_v P G^l G^r G^t G^b       │
                 (modified LFSR in test)          └──► signature comparator ──► fail flag
```

- **Input register (`mod_lfsr`).** It holds seven bits, stages 1..7 =
  G^b, G^t, G^r, G^l, P_v, P_h, P. In normal mode each stage has its own
  next-state rule:
  - P shifts in from the left while the bit map is loaded;
  - P_h and P_v copy the neighbours' P;
  - each G^x follows the outerfield recurrence G^x ← ~P ∧ G^x(neighbour on
    side x).

  Outside the array, the outerfield inputs are tied to 1 and the pattern
  inputs to 0. The outerfield values therefore spread inwards from the edges
  as a wavefront and are settled n clocks after loading. In test mode the
  register becomes a shift register with feedback x^7 + x^4 + 1. A NOR of
  stages 1..6 is XORed into the feedback, which adds the all-zero state to the
  cycle, so the register steps through all 128 states starting from zero. The
  two feedback taps sit at the ends of the register, with no XOR between
  stages.

- **PPL (`ppl`).** The PPL is pure combinational logic: twelve NOR terms over
  the register bits and their complements, as in the table above.

- **BILBO (`bilbo`).** A 12-bit register with two broadcast mode lines:

  | K1 K2 | mode |
  |---|---|
  | 1 0 | parallel load of the 12 fields |
  | 0 1 | shift register; PPL inputs gated off, feedback cut, serial out = bit 11 |
  | 0 0 | MISR (signature compaction), feedback x^12 + x^6 + x^4 + x + 1 |
  | 1 1 | clear (this design's choice) |

- **Comparator (`sig_comparator`).** A hard-wired equality test of the BILBO
  contents against the good-machine signature. A PE fails when the two
  differ.

- **Propagating registers.** There are two 1-bit registers, one shifting
  towards the right edge and one towards the bottom edge. On a "select"
  clock they take the PE's own bit, which is the BILBO's serial output in
  normal mode and the fail flag in test mode. Otherwise they take the
  neighbour's bit. After n shifts, a row's bits have all passed the right
  edge and a column's bits the bottom edge. The counters there add them up.

## Normal-mode timing

The sequencer (`fe_sequencer`) runs the array as a two-stage pipeline. While one
character's fields are being projected out of the BILBOs, the next character is
loaded into the input registers and its outerfields settle.

| phase | clocks | what happens |
|---|---|---|
| load | n | `col_req` high; host drives column `col_idx` on `row_in`, last column first |
| generate | n | bit map held, outerfields settle |
| capture | 1 | K1 K2 = 1 0, all BILBOs take their 12 fields (`char_capture`) |
| per field: shift | 1 | K1 K2 = 0 1, BILBO bit enters the propagating registers, counters cleared |
| per field: propagate | n | registers shift, edge counters count |
| per field: report | — | `field_valid` pulses, `field_idx` names the field, `row_count`/`col_count` hold the projection |

Projection takes 12(n + 1) clocks, which is 252 at n = 20. Loading and
generation take 2n = 40 clocks and overlap with projection, so a character
leaves every 252 clocks. At 25 MHz that is about 99,000 characters per second,
far above the roughly 3,000 characters per second of fast optical scanners.
The first `field_valid` comes 3n + 4 clocks after `run` is sampled.

## Self-test and the reject rule

`test_start` (taken while idle) runs the following sequence:

1. one clock clearing the input registers and BILBOs;
2. 128 clocks with K1 = K2 = 0, so every PPL sees all 128 input patterns and
   every BILBO compacts the 128 responses;
3. one clock loading each PE's fail flag into its propagating registers;
4. n clocks shifting the flags into the counters.

`test_done` then pulses with the per-row and per-column fault counts on
`row_count`/`col_count`. `chip_reject` is updated on the next clock: it is 1
when any count exceeds one. The whole test takes 2^7 + n + 3 clocks.

The good signature for the polynomial and field order used here is
`12'hA3B`. It is the BILBO contents after 128 MISR steps from zero, with the
fault-free PPL driven by the LFSR sequence from zero. Changing the PPL, the LFSR,
the BILBO polynomial or the field order changes it. `fe_ref_pkg::good_signature()` (in `tb/`) runs the same loop from the field
equations, and `tb_pe` checks a PE's self-test result against it. After a
change, take the new value from that function and pass it to the `GOOD_SIG`
parameter of `pe`, `pe_array` and `sig_comparator`.

## Top level and interface

`fe_top` (parameters `N = 20`, `CW = $clog2(N+1)`) holds the sequencer, the
array and the two counter banks (`proj_counters`, one counter per row and one
per column).

| port | dir | meaning |
|---|---|---|
| `run` | in | keep taking and projecting characters |
| `test_start` | in | start a self-test when idle |
| `col_req`, `col_idx` | out | request column `col_idx` of the bit map on `row_in` this clock |
| `row_in[N]` | in | one bit-map column, bit i = row i |
| `field_valid`, `field_idx[4]` | out | a projection is ready; which field (`fe_pkg::field_e`) |
| `row_count[N]`, `col_count[N]` | out | horizontal / vertical projection, or fault counts after a test |
| `test_done`, `chip_reject` | out | end of self-test; rule-of-one decision |
| `busy` | out | sequencer active |
| `pe_sig_ok[N][N]` | out | every PE's comparator output, for observation |
| `char_capture` | out | a loaded character enters the BILBOs |

Clock and reset: a single rising-edge clock `clk`. The active-low
asynchronous reset `rst_n` resets every register. In addition, the sequencer
clears the PE input registers and BILBOs with a synchronous broadcast line
before each self-test.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`. `tb/fe_ref_pkg.sv` holds the reference
model (fields and projections of a bit map, test characters). For example,
the end-to-end test at the full 20 × 20 size:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  rtl/fe_pkg.sv tb/fe_ref_pkg.sv rtl/*.sv tb/tb_fe_top.sv --top-module tb_fe_top
./obj_dir/Vtb_fe_top
```

`tb_fe_top` runs at default parameters. It runs five characters through the
pipeline and compares all 60 projections with the reference model. It checks
the 252-clock period and the 3n + 4 first-output latency. It then runs the
self-test five times:

- fault-free: accepted;
- one faulty PE: tolerated;
- two faulty PEs in one row: rejected;
- two faulty PEs in one column: rejected;
- fault-free again: accepted.

Faults are injected by corrupting a chosen PE's signature just before the
fail flags are loaded. It also counts how often each mechanism occurred:
overlapped loading, field reports, passing test, fault detection, tolerance
and rejection.

`tb_fe_stream` streams 36 characters back to back at full size. It checks
all 432 projections, a period of exactly 252 clocks between characters, and
that every load overlaps the previous projection. It then runs a self-test
and one more character, to show that test mode leaves nothing behind.

`tb_pe_fault_sim` runs the fault simulation of one PE. It models the NOR
plane as a 12 × 12 crosspoint grid and builds 192 faults:

- every crosspoint toggled (a missing or an extra transistor);
- every output line stuck at 0 and at 1;
- every input column line stuck at 0 and at 1.

For each fault it runs the full self-test on the RTL PE. All 192 faults
change the plane's function, all are detected, and none aliases to the good
signature.

Block tests use smaller arrays where that shortens simulation: `tb_pe_array`
uses n = 8 and `tb_fe_sequencer` uses n = 5. To change the array size, set `N`
on `fe_top`. Nothing else in the RTL depends on 20.

## Departures and open points

- **Registers.** The chip uses master-slave pairs of static D latches on a
  two-phase clock. The clock φ̄ is generated locally in each PE, and the
  registers are gated by clock qualifiers. Here every register is an
  edge-triggered flip-flop on one clock, and each qualifier is an enable
  line. The clock generator, the drivers and the latch circuit are not part
  of the RTL.
- **Clear.** The chip clears the PE registers asynchronously. Here the clear
  is a synchronous broadcast line, which costs one clock at the start of a
  test.
- **Signature value.** The chip's burned-in signature belongs to its own MISR
  polynomial and bit wiring, and the polynomial is not given. Here the
  polynomial is x^12 + x^6 + x^4 + x + 1, and the signature (`12'hA3B`)
  follows from it.
- **Corner fields.** The two descriptions of the corner fields disagree. One
  ANDs the two adjacent outerfields. The other, in the minimised NOR form,
  reads as a NOR of the uncomplemented outerfields. The AND definition is
  used, built as a NOR of the complemented outerfields.
- **Control lines.** Only K1 and K2 have defined codes. The chip routes four
  controls (K1–K4). The other lines here (load, LFSR enable, BILBO enable,
  propagate enable and select, clear) are this design's own encoding.
- **First-output latency.** The original description puts the first output
  "after 2n cycles", which covers loading and outerfield generation only. Here
  the first complete projection appears 3n + 4 clocks after start. That count
  adds the start clock, the capture, the first shift, n propagation clocks and
  the report clock.
- **Test length.** The test takes 2^7 + n clocks of compaction and
  propagation, plus a clear, a fail-flag load and a start clock.
- **Projection counters.** The counters belong to the host side, but they sit
  inside `fe_top` so the top is complete. Rule 1 (reject when more than one
  fault in any row or column) is implemented in hardware. The alternative
  rule (no two faulty PEs may be neighbours) is not.
- **Not included:** the classifier on the host processor, preprocessing
  (smoothing, thinning), pads and routing, and the 8-connected extension.

## Trust

All blocks pass their self-checking testbenches. The self-test detects
every single fault of the NOR-plane fault set. Each testbench fails
against a deliberately broken copy of its block. The field equations, the
outerfield recurrence, the LFSR polynomial, the BILBO modes and their K1/K2
codes, the pipeline overlap, the 12(n + 1) period and the reject rule follow
the original design. The MISR polynomial, the signature value, the control
encoding and the edge conventions (outerfield input 1,
pattern input 0 outside the array) are this implementation's choices.
