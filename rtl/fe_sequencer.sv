// fe_sequencer: the external controller that drives the array's broadcast
// control lines and the edge counters.
//
// Normal mode (run high) is a two-stage pipeline, as the design intends: while
// the fields of one character are being projected out of the BILBOs, the next
// bit map is already being loaded and its outerfields generated.
//   loader:    LOAD  n clocks   col_req high; the host drives bit-map column
//                               col_idx on row_in (last column first, so the
//                               first column ends up in PE column 1)
//              GEN   n clocks   outerfield wavefronts settle
//              FULL             waits until the BILBOs are free
//   capture:   1 clock          K1 K2 = 1 0, BILBOs load the 12 fields; taken
//                               as soon as FULL and the projector is idle or in
//                               the propagation phase of its last field
//   projector: per field f = 0..11:
//              SHIFT 1 clock    K1 K2 = 0 1, BILBO shifts once, its serial bit
//                               enters the propagating registers; counters clear
//              PROP  n clocks   propagating registers shift, counters count
//              field_valid pulses on the clock after PROP with field_idx = f
//              (the order of fe_pkg::field_e, P first), while the counters hold
//              the projection.
// One character thus takes 12(n+1) clocks in steady state. The first
// field_valid comes 3n + 4 clocks after the clock that samples run: 1 start,
// n load, n generation, 1 capture, 1 shift, n propagation, 1 to report.
//
// Test mode (test_start while idle): CLR 1 clock; RUN 2^7 = 128 clocks with
// K1 = K2 = 0 (input register as modified LFSR, BILBO as MISR); LOAD 1 clock,
// each PE's fail flag enters its propagating registers; PROP n clocks into
// the counters; test_done then pulses for one clock with the per-row and
// per-column fault counts in the counters, 2^7 + n + 3 clocks after the clock
// that samples test_start.
//
// The phase lengths and the K1/K2 codes follow the design; the encoding of the
// other lines, the start/handshake signals and the capture overlap are this
// implementation's choices.
module fe_sequencer
  import fe_pkg::*;
#(
  parameter int unsigned N = 20,
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,          // keep loading and projecting characters
  input  logic          test_start,   // start a self-test (taken only when idle)
  output pe_ctrl_t      ctrl,
  output logic          col_req,      // host must drive bit-map column col_idx on row_in
  output logic [CW-1:0] col_idx,
  output logic          cnt_clr,
  output logic          cnt_en,
  output logic          field_valid,
  output logic [3:0]    field_idx,
  output logic          test_done,
  output logic          capture,      // BILBO capture of a new character this clock
  output logic          busy
);

  typedef enum logic [1:0] {L_IDLE, L_LOAD, L_GEN, L_FULL} load_st_e;
  typedef enum logic [1:0] {P_IDLE, P_SHIFT, P_PROP} proj_st_e;
  typedef enum logic [2:0] {T_IDLE, T_CLR, T_RUN, T_LOAD, T_PROP} test_st_e;

  load_st_e lst;
  proj_st_e pst;
  test_st_e tst;
  logic [CW-1:0] lcnt, pcnt;
  logic [7:0]    tcnt;
  logic [3:0]    field;
  logic          pend;
  logic          all_idle;

  always_comb begin
    all_idle = (lst == L_IDLE) && (pst == P_IDLE) && !pend && (tst == T_IDLE);
    capture  = (lst == L_FULL) &&
               (((pst == P_IDLE) && !pend) ||
                ((pst == P_PROP) && (field == 4'(FIELDS - 1)) && !pend));
    busy     = !all_idle;
    col_req  = (lst == L_LOAD);
    col_idx  = CW'(N - 1) - lcnt;
  end

  // Control lines.
  always_comb begin
    ctrl    = '0;
    cnt_clr = 1'b0;
    cnt_en  = 1'b0;
    if (tst != T_IDLE) begin
      ctrl.k1 = 1'b0;
      ctrl.k2 = 1'b0;
      unique case (tst)
        T_CLR:  ctrl.clr = 1'b1;
        T_RUN:  begin ctrl.lfsr_en = 1'b1; ctrl.bilbo_en = 1'b1; end
        T_LOAD: begin ctrl.prop_en = 1'b1; ctrl.prop_sel = 1'b1; cnt_clr = 1'b1; end
        T_PROP: begin ctrl.prop_en = 1'b1; cnt_en = 1'b1; end
        default: ;
      endcase
    end else begin
      // Normal mode: K1 | K2 stays high so the input register never runs as LFSR.
      ctrl.k1      = capture;
      ctrl.k2      = !capture;
      ctrl.lfsr_en = 1'b1;
      ctrl.load    = (lst == L_LOAD);
      ctrl.bilbo_en = capture || (pst == P_SHIFT);
      if (pst == P_SHIFT) begin
        ctrl.prop_en  = 1'b1;
        ctrl.prop_sel = 1'b1;
        cnt_clr       = 1'b1;
      end else if (pst == P_PROP) begin
        ctrl.prop_en = 1'b1;
        cnt_en       = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lst <= L_IDLE; pst <= P_IDLE; tst <= T_IDLE;
      lcnt <= '0; pcnt <= '0; tcnt <= '0; field <= '0; pend <= 1'b0;
      field_valid <= 1'b0; field_idx <= '0; test_done <= 1'b0;
    end else begin
      field_valid <= 1'b0;
      test_done   <= 1'b0;

      // Self-test.
      unique case (tst)
        T_IDLE: if (test_start && all_idle && !run) tst <= T_CLR;
        T_CLR:  begin tst <= T_RUN; tcnt <= '0; end
        T_RUN:  begin
                  tcnt <= tcnt + 8'd1;
                  if (tcnt == 8'(TEST_CYCLES - 1)) tst <= T_LOAD;
                end
        T_LOAD: begin tst <= T_PROP; tcnt <= '0; end
        T_PROP: begin
                  tcnt <= tcnt + 8'd1;
                  if (tcnt == 8'(N - 1)) begin tst <= T_IDLE; test_done <= 1'b1; end
                end
        default: tst <= T_IDLE;
      endcase

      // Loader.
      unique case (lst)
        L_IDLE: if (run && tst == T_IDLE && !test_start) begin lst <= L_LOAD; lcnt <= '0; end
        L_LOAD: begin
                  lcnt <= lcnt + 1'b1;
                  if (lcnt == CW'(N - 1)) begin lst <= L_GEN; lcnt <= '0; end
                end
        L_GEN:  begin
                  lcnt <= lcnt + 1'b1;
                  if (lcnt == CW'(N - 1)) lst <= L_FULL;
                end
        L_FULL: if (capture) begin
                  lcnt <= '0;
                  lst  <= run ? L_LOAD : L_IDLE;
                end
        default: lst <= L_IDLE;
      endcase

      // Projector.
      unique case (pst)
        P_IDLE:  if (capture) begin pst <= P_SHIFT; field <= '0; end
        P_SHIFT: begin pst <= P_PROP; pcnt <= '0; end
        P_PROP:  begin
                   pcnt <= pcnt + 1'b1;
                   if (capture) pend <= 1'b1;
                   if (pcnt == CW'(N - 1)) begin
                     field_valid <= 1'b1;
                     field_idx   <= 4'(FIELDS - 1) - field;  // bit 11 leaves first
                     if (field == 4'(FIELDS - 1)) begin
                       if (pend || capture) begin
                         pst <= P_SHIFT; field <= '0; pend <= 1'b0;
                       end else begin
                         pst <= P_IDLE;
                       end
                     end else begin
                       pst   <= P_SHIFT;
                       field <= field + 4'd1;
                     end
                   end
                 end
        default: pst <= P_IDLE;
      endcase
    end
  end

endmodule
