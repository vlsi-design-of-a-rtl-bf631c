// fe_pkg: types and constants shared by the feature-extraction processor array.
//
// Every processing element (PE) holds a 7-bit input register (pattern bit,
// its left and upper neighbours' pattern bits and the four outerfield bits)
// and a 12-bit output register (the feature fields of its pixel). The field
// order and the seven input-stage names below follow the unit-cell and
// test-configuration drawings of the design. The control bundle that a
// sequencer broadcasts to every PE is this design's own encoding: only the
// two BILBO mode lines K1 and K2 carry the meaning the design gives them.
package fe_pkg;

  localparam int unsigned IN_W   = 7;   // input register / modified LFSR length k
  localparam int unsigned FIELDS = 12;  // output register / BILBO (MISR) length r
  localparam int unsigned TEST_CYCLES = 1 << IN_W;  // 2^k exhaustive test patterns

  // Input-register stages, stage 1 .. stage 7 of the LFSR chain.
  typedef enum logic [2:0] {
    S_GB = 3'd0,  // G^b  bottom outerfield
    S_GT = 3'd1,  // G^t  top outerfield
    S_GR = 3'd2,  // G^r  right outerfield
    S_GL = 3'd3,  // G^l  left outerfield
    S_PV = 3'd4,  // P_v = P(i-1,j), pattern bit of the PE above
    S_PH = 3'd5,  // P_h = P(i,j-1), pattern bit of the PE to the left
    S_P  = 3'd6   // P(i,j) own pattern bit
  } in_stage_e;

  // Output-register bits (projection order: bit 11 leaves the BILBO first).
  typedef enum logic [3:0] {
    F_P   = 4'd11,  // pattern
    F_I   = 4'd10,  // inner field (bubbles)
    F_OT  = 4'd9,   // open to the top
    F_OB  = 4'd8,   // open to the bottom
    F_OR  = 4'd7,   // open to the right
    F_OL  = 4'd6,   // open to the left
    F_H   = 4'd5,   // horizontal line
    F_V   = 4'd4,   // vertical line
    F_CRB = 4'd3,   // corner right-bottom
    F_CLB = 4'd2,   // corner left-bottom
    F_CRT = 4'd1,   // corner right-top
    F_CLT = 4'd0    // corner left-top
  } field_e;

  // Control lines broadcast to the whole array each clock.
  typedef struct packed {
    logic clr;       // synchronous clear of input register and BILBO
    logic k1;        // BILBO mode: k1,k2 = 10 parallel load, 01 shift, 00 MISR (test)
    logic k2;
    logic lfsr_en;   // clock qualifier of the input register / LFSR
    logic load;      // pattern bits shift one column to the right (bit-map load)
    logic bilbo_en;  // clock qualifier of the BILBO
    logic prop_en;   // clock qualifier of the propagating registers
    logic prop_sel;  // 1: propagating registers take the PE's own bit, 0: shift from neighbour
  } pe_ctrl_t;

endpackage
