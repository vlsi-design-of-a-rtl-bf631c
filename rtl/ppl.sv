// ppl: programmable path logic of one processing element.
//
// A single NOR plane turns the seven stored bits of a pixel into its twelve
// feature-field bits. Each output is the NOR of a few true or complemented
// inputs (both polarities come straight from the input register):
//   P   = NOR(~P)                        the pattern bit itself
//   I   = NOR(P, Gl, Gr, Gt, Gb)         inner field: not pattern, reached by no outerfield
//   Ox  = NOR(P, ~Gx, the other three G) open field x: reached only from side x
//   H   = NOR(~P, ~Ph)                   horizontal line: pixel and left neighbour set
//   V   = NOR(~P, ~Pv)                   vertical line: pixel and upper neighbour set
//   Cxy = NOR(~Gx, ~Gy)                  corner field: reached from both sides x and y
// The product terms follow the design's minimised equations and its PPL
// drawing; the corner terms take the field definition, which ANDs the two
// adjacent outerfields, using the complemented register outputs. The chip evaluates the plane as precharged dynamic
// logic on the two clock phases; here it is plain combinational logic, and the
// BILBO that follows samples it on the clock edge.
//
// The P output is the stored pattern bit itself (a NOR of its complement),
// so it is a straight wire from the input.
//
// Interface: in_q[6:0] indexed by fe_pkg::in_stage_e, fields[11:0] indexed by
// fe_pkg::field_e. Purely combinational, no clock.
module ppl
  import fe_pkg::*;
(
  input  logic [IN_W-1:0]   in_q,
  output logic [FIELDS-1:0] fields
);

  logic p, ph, pv, gl, gr, gt, gb;

  always_comb begin
    p  = in_q[S_P];
    ph = in_q[S_PH];
    pv = in_q[S_PV];
    gl = in_q[S_GL];
    gr = in_q[S_GR];
    gt = in_q[S_GT];
    gb = in_q[S_GB];

    fields        = '0;
    fields[F_P]   = ~(~p);
    fields[F_I]   = ~(p | gr | gb | gt | gl);
    fields[F_OR]  = ~(p | ~gr | gb | gt | gl);
    fields[F_OB]  = ~(p | gr | ~gb | gt | gl);
    fields[F_OT]  = ~(p | gr | gb | ~gt | gl);
    fields[F_OL]  = ~(p | gr | gb | gt | ~gl);
    fields[F_H]   = ~(~p | ~ph);
    fields[F_V]   = ~(~p | ~pv);
    fields[F_CRB] = ~(~gr | ~gb);
    fields[F_CLB] = ~(~gb | ~gl);
    fields[F_CRT] = ~(~gr | ~gt);
    fields[F_CLT] = ~(~gt | ~gl);
  end

endmodule
