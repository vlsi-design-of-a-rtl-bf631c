// tb_pe: one processing element with its neighbours driven by the testbench.
//  - normal mode, 60 random cases: load a pattern bit, apply random neighbour
//    pattern and outerfield bits for one generation clock, capture the fields
//    into the BILBO and shift them out through both propagating registers;
//    each of the 12 serial bits is compared with the field definitions.
//  - neighbour shifting of the propagating registers.
//  - self-test: 128 clocks of LFSR/MISR must give the good signature, the
//    comparator must pass and a 0 must be loaded as fail flag; then with one
//    PPL output forced stuck-at-0 the signature must fail and a 1 be loaded.
module tb_pe;
  import fe_pkg::*;

  logic clk = 0, rst_n = 0;
  pe_ctrl_t ctrl = '0;
  logic p_left = 0, p_up = 0, gl_in = 0, gr_in = 0, gt_in = 0, gb_in = 0, fh_in = 0, fv_in = 0;
  logic p_q, gl_q, gr_q, gt_q, gb_q, fh_q, fv_q, sig_ok;
  int checks = 0, failures = 0;

  pe dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic self_test(output logic [FIELDS-1:0] sig);
    ctrl = '0; ctrl.clr = 1;
    @(negedge clk);
    ctrl = '0; ctrl.lfsr_en = 1; ctrl.bilbo_en = 1;   // K1 = K2 = 0
    repeat (TEST_CYCLES) @(negedge clk);
    ctrl = '0;
    sig = dut.u_bilbo.q;
  endtask

  initial begin
    logic [FIELDS-1:0] sig;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 60; t++) begin
      bit p, ph, pv, l, r, u, b, gl, gr, gt, gb, inner;
      bit exp_f [12];
      p = 1'($urandom); ph = 1'($urandom); pv = 1'($urandom);
      l = 1'($urandom); r = 1'($urandom); u = 1'($urandom); b = 1'($urandom);
      // load the pattern bit
      ctrl = '0; ctrl.k2 = 1; ctrl.lfsr_en = 1; ctrl.load = 1; p_left = p;
      @(negedge clk);
      check(p_q == p, "pattern load");
      // one generation clock
      ctrl.load = 0; p_left = ph; p_up = pv; gl_in = l; gr_in = r; gt_in = u; gb_in = b;
      @(negedge clk);
      gl = !p && l; gr = !p && r; gt = !p && u; gb = !p && b;
      check({gl_q, gr_q, gt_q, gb_q} == {gl, gr, gt, gb}, "outerfield step");
      // capture
      ctrl = '0; ctrl.k1 = 1; ctrl.bilbo_en = 1;
      @(negedge clk);
      inner = !(p || gl || gr || gt || gb);
      exp_f[11] = p;  exp_f[10] = inner;
      exp_f[9] = !(p || inner || gl || gr || gb);
      exp_f[8] = !(p || inner || gl || gr || gt);
      exp_f[7] = !(p || inner || gl || gt || gb);
      exp_f[6] = !(p || inner || gr || gt || gb);
      exp_f[5] = p && ph; exp_f[4] = p && pv;
      exp_f[3] = gr && gb; exp_f[2] = gl && gb; exp_f[1] = gr && gt; exp_f[0] = gl && gt;
      for (int f = 11; f >= 0; f--) begin
        ctrl = '0; ctrl.k2 = 1; ctrl.bilbo_en = 1; ctrl.prop_en = 1; ctrl.prop_sel = 1;
        @(negedge clk);
        check(fh_q == exp_f[f] && fv_q == exp_f[f], $sformatf("case %0d field %0d", t, f));
      end
    end
    // propagating registers shift from the neighbours
    ctrl = '0; ctrl.k2 = 1; ctrl.prop_en = 1;
    for (int t = 0; t < 8; t++) begin
      fh_in = t[0]; fv_in = t[1];
      @(negedge clk);
      check(fh_q == t[0] && fv_q == t[1], "propagation shift");
    end
    ctrl.prop_en = 0; fh_in = ~fh_q;
    @(negedge clk);
    check(fh_q != fh_in, "propagating register holds without qualifier");

    // self-test, fault free
    self_test(sig);
    check(sig == fe_ref_pkg::good_signature(), $sformatf("signature %h matches the reference model", sig));
    check(fe_ref_pkg::good_signature() == 12'hA3B, "reference signature equals the comparator constant");
    check(sig_ok == 1, "comparator passes");
    ctrl = '0; ctrl.prop_en = 1; ctrl.prop_sel = 1;  // K1 = K2 = 0: load fail flag
    @(negedge clk);
    check(fh_q == 0 && fv_q == 0, "no fault flagged");

    // self-test with the horizontal-line output stuck at 0
    force dut.fields[F_H] = 1'b0;
    self_test(sig);
    check(sig_ok == 0, $sformatf("stuck-at fault detected, sig %h", sig));
    ctrl = '0; ctrl.prop_en = 1; ctrl.prop_sel = 1;
    @(negedge clk);
    check(fh_q == 1 && fv_q == 1, "fault flagged");
    release dut.fields[F_H];

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
