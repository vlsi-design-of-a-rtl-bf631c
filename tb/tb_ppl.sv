// tb_ppl: applies all 128 input combinations to the PPL and compares every
// output with the field definitions written independently (inner field as the
// complement of pattern OR outerfields, open field as the complement of
// pattern OR inner OR the three other outerfields, lines and corners as ANDs).
module tb_ppl;
  import fe_pkg::*;

  logic [IN_W-1:0]   in_q;
  logic [FIELDS-1:0] fields, exp_f;
  int checks = 0, failures = 0;

  ppl dut (.in_q, .fields);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      bit p, ph, pv, gl, gr, gt, gb, inner;
      in_q = IN_W'(v);
      #1;
      p = in_q[S_P]; ph = in_q[S_PH]; pv = in_q[S_PV];
      gl = in_q[S_GL]; gr = in_q[S_GR]; gt = in_q[S_GT]; gb = in_q[S_GB];
      inner = !(p || gl || gr || gt || gb);
      exp_f = '0;
      exp_f[F_P]   = p;
      exp_f[F_I]   = inner;
      exp_f[F_OB]  = !(p || inner || gl || gr || gt);
      exp_f[F_OT]  = !(p || inner || gl || gr || gb);
      exp_f[F_OR]  = !(p || inner || gl || gt || gb);
      exp_f[F_OL]  = !(p || inner || gr || gt || gb);
      exp_f[F_H]   = p && ph;
      exp_f[F_V]   = p && pv;
      exp_f[F_CRB] = gr && gb;
      exp_f[F_CLB] = gl && gb;
      exp_f[F_CRT] = gr && gt;
      exp_f[F_CLT] = gl && gt;
      checks++;
      if (fields !== exp_f) begin
        failures++;
        $display("mismatch in=%b got=%b exp=%b", in_q, fields, exp_f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
