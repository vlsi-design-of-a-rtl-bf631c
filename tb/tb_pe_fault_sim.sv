// tb_pe_fault_sim: fault simulation of one PE's NOR plane under the built-in
// self-test.
//
// The plane is a 12 x 12 crosspoint grid: rows are the twelve field outputs,
// columns the literals P, ~P, ~P_h, ~P_v, G^r, ~G^r, G^b, ~G^b, G^t, ~G^t,
// G^l, ~G^l, and a row's output is the NOR of the columns that carry a
// transistor. The fault list is the reduced set the plane's transistor faults
// collapse to:
//   - every crosspoint toggled (a missing or an extra device),  144 faults
//   - every output line stuck-at-0 and stuck-at-1,               24 faults
//   - every input column line stuck-at-0 and stuck-at-1,         24 faults
// For each fault the testbench runs the full self-test on the RTL PE (clear,
// 128 clocks with K1 = K2 = 0, fail-flag load), replacing the PPL output each
// clock by the faulty plane's value for the current input-register state. A
// fault that does not change the plane's function over the 128 inputs is
// counted as redundant and must pass; every other fault must make the
// comparator fail and put a 1 into both propagating registers. A fault that
// changes the function but still gives the good signature is aliasing, which
// the design expects never to happen for this fault set.
//
// The fault-free grid is also checked against the RTL plane on all 128
// states, so the crosspoint model and the RTL cannot drift apart.
module tb_pe_fault_sim;
  import fe_pkg::*;

  logic clk = 0, rst_n = 0;
  pe_ctrl_t ctrl = '0;
  logic p_left = 0, p_up = 0, gl_in = 0, gr_in = 0, gt_in = 0, gb_in = 0, fh_in = 0, fv_in = 0;
  logic p_q, gl_q, gr_q, gt_q, gb_q, fh_q, fv_q, sig_ok;
  int checks = 0, failures = 0;
  int n_faults = 0, n_redundant = 0, n_detected = 0, n_aliased = 0, n_flagged = 0;

  pe dut (.*);

  always #5 clk = ~clk;

  // Column numbers of the crosspoint grid.
  localparam int C_P = 0, C_NP = 1, C_NPH = 2, C_NPV = 3, C_GR = 4, C_NGR = 5,
                 C_GB = 6, C_NGB = 7, C_GT = 8, C_NGT = 9, C_GL = 10, C_NGL = 11;
  localparam int COLS = 12;

  typedef logic [COLS-1:0] row_t;
  typedef row_t grid_t [FIELDS];

  // Fault kinds.
  localparam int K_NONE = 0, K_XPOINT = 1, K_OUT_SA = 2, K_IN_SA = 3;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic grid_t good_grid();
    grid_t g;
    g[F_P]   = row_t'(1 << C_NP);
    g[F_I]   = row_t'((1 << C_P) | (1 << C_GR) | (1 << C_GB) | (1 << C_GT) | (1 << C_GL));
    g[F_OT]  = row_t'((1 << C_P) | (1 << C_GR) | (1 << C_GB) | (1 << C_NGT) | (1 << C_GL));
    g[F_OB]  = row_t'((1 << C_P) | (1 << C_GR) | (1 << C_NGB) | (1 << C_GT) | (1 << C_GL));
    g[F_OR]  = row_t'((1 << C_P) | (1 << C_NGR) | (1 << C_GB) | (1 << C_GT) | (1 << C_GL));
    g[F_OL]  = row_t'((1 << C_P) | (1 << C_GR) | (1 << C_GB) | (1 << C_GT) | (1 << C_NGL));
    g[F_H]   = row_t'((1 << C_NP) | (1 << C_NPH));
    g[F_V]   = row_t'((1 << C_NP) | (1 << C_NPV));
    g[F_CRB] = row_t'((1 << C_NGR) | (1 << C_NGB));
    g[F_CLB] = row_t'((1 << C_NGL) | (1 << C_NGB));
    g[F_CRT] = row_t'((1 << C_NGR) | (1 << C_NGT));
    g[F_CLT] = row_t'((1 << C_NGL) | (1 << C_NGT));
    return g;
  endfunction

  // Column line values for an input-register state (stages as fe_pkg::in_stage_e).
  function automatic row_t literals(input logic [IN_W-1:0] s);
    row_t l;
    l[C_P]   =  s[S_P];   l[C_NP]  = ~s[S_P];
    l[C_NPH] = ~s[S_PH];  l[C_NPV] = ~s[S_PV];
    l[C_GR]  =  s[S_GR];  l[C_NGR] = ~s[S_GR];
    l[C_GB]  =  s[S_GB];  l[C_NGB] = ~s[S_GB];
    l[C_GT]  =  s[S_GT];  l[C_NGT] = ~s[S_GT];
    l[C_GL]  =  s[S_GL];  l[C_NGL] = ~s[S_GL];
    return l;
  endfunction

  // Plane output under a fault: kind, row or column index a, stuck value v.
  function automatic logic [FIELDS-1:0] plane(input grid_t g, input logic [IN_W-1:0] s,
                                              input int kind, input int a, input int c, input bit v);
    row_t l;
    logic [FIELDS-1:0] f;
    grid_t gg = g;
    l = literals(s);
    if (kind == K_XPOINT) gg[a][c] = ~gg[a][c];
    if (kind == K_IN_SA)  l[c] = v;
    for (int k = 0; k < FIELDS; k++) f[k] = ~|(l & gg[k]);
    if (kind == K_OUT_SA) f[a] = v;
    return f;
  endfunction

  // Run one self-test with the plane replaced by the faulty one.
  task automatic run_test(input int kind, input int a, input int c, input bit v,
                          output bit ok, output bit flag);
    grid_t g = good_grid();
    ctrl = '0; ctrl.clr = 1;
    @(negedge clk);
    ctrl = '0; ctrl.lfsr_en = 1; ctrl.bilbo_en = 1;   // K1 = K2 = 0
    for (int t = 0; t < TEST_CYCLES; t++) begin
      force dut.fields = plane(g, dut.in_q, kind, a, c, v);
      @(negedge clk);
    end
    release dut.fields;
    ctrl = '0;
    #1 ok = sig_ok;
    ctrl.prop_en = 1; ctrl.prop_sel = 1;               // load fail flag
    @(negedge clk);
    flag = fh_q & fv_q;
    check(fh_q == fv_q, "both propagating registers take the same fail flag");
    ctrl = '0;
  endtask

  initial begin
    grid_t g;
    bit ok, flag, redundant;
    g = good_grid();
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // The crosspoint grid is the RTL plane.
    for (int s = 0; s < (1 << IN_W); s++) begin
      force dut.in_q = IN_W'(s);
      #1 check(dut.fields == plane(g, IN_W'(s), K_NONE, 0, 0, 0),
               $sformatf("grid model equals RTL plane for state %0d", s));
    end
    release dut.in_q;
    @(negedge clk);

    run_test(K_NONE, 0, 0, 0, ok, flag);
    check(ok && !flag, "fault-free PE passes its self-test");

    for (int kind = K_XPOINT; kind <= K_IN_SA; kind++)
      for (int a = 0; a < ((kind == K_IN_SA) ? 1 : FIELDS); a++)
        for (int c = 0; c < ((kind == K_OUT_SA) ? 1 : COLS); c++)
          for (int v = 0; v < ((kind == K_XPOINT) ? 1 : 2); v++) begin
            n_faults++;
            redundant = 1;
            for (int s = 0; s < (1 << IN_W); s++)
              if (plane(g, IN_W'(s), kind, a, c, v[0]) != plane(g, IN_W'(s), K_NONE, 0, 0, 0))
                redundant = 0;
            run_test(kind, a, c, v[0], ok, flag);
            if (redundant) begin
              n_redundant++;
              check(ok && !flag, $sformatf("redundant fault kind %0d a %0d c %0d v %0d passes", kind, a, c, v));
            end else begin
              if (!ok) n_detected++; else n_aliased++;
              if (flag) n_flagged++;
              check(!ok, $sformatf("fault kind %0d a %0d c %0d v %0d detected", kind, a, c, v));
              check(flag == !ok, "fail flag follows the comparator");
            end
          end

    $display("faults=%0d redundant=%0d detected=%0d aliased=%0d flagged=%0d",
             n_faults, n_redundant, n_detected, n_aliased, n_flagged);
    check(n_faults == 192, "fault list complete");
    check(n_detected > 0 && n_flagged > 0, "detection happened");
    check(n_aliased == 0, "no aliasing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
