// fe_ref_pkg: behavioural reference for the feature fields of a bit map,
// written directly from the field definitions (outerfields by scanning each
// row and column from the edge until the first pattern pixel), independent of
// the array's wavefront and NOR-plane implementation.
package fe_ref_pkg;

  localparam int MAXN = 32;
  typedef bit bm_t [MAXN][MAXN];
  typedef int vec_t [MAXN];

  // Field numbers as in fe_pkg::field_e.
  function automatic bit field_bit(input bm_t p, input int n, input int f, input int i, input int j);
    bit gl, gr, gt, gb, pij, inner, ph, pv;
    pij = p[i][j];
    gl = 1; for (int k = 0; k <= j; k++)    if (p[i][k]) gl = 0;
    gr = 1; for (int k = j; k < n; k++)     if (p[i][k]) gr = 0;
    gt = 1; for (int k = 0; k <= i; k++)    if (p[k][j]) gt = 0;
    gb = 1; for (int k = i; k < n; k++)     if (p[k][j]) gb = 0;
    ph = (j > 0) ? p[i][j-1] : 0;
    pv = (i > 0) ? p[i-1][j] : 0;
    inner = !(pij || gl || gr || gt || gb);
    case (f)
      11: return pij;
      10: return inner;
      9:  return !(pij || inner || gl || gr || gb);   // open to the top
      8:  return !(pij || inner || gl || gr || gt);   // open to the bottom
      7:  return !(pij || inner || gl || gt || gb);   // open to the right
      6:  return !(pij || inner || gr || gt || gb);   // open to the left
      5:  return pij && ph;
      4:  return pij && pv;
      3:  return gr && gb;
      2:  return gl && gb;
      1:  return gr && gt;
      0:  return gl && gt;
      default: return 0;
    endcase
  endfunction

  function automatic void projections(input bm_t p, input int n, input int f,
                                      output vec_t rows, output vec_t cols);
    for (int k = 0; k < MAXN; k++) begin rows[k] = 0; cols[k] = 0; end
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        if (field_bit(p, n, f, i, j)) begin
          rows[i]++;
          cols[j]++;
        end
  endfunction

  // A few test characters drawn in an n x n grid (n >= 8), plus random noise.
  function automatic bm_t make_char(input int n, input int which, input int unsigned seed);
    bm_t p;
    int a, b, m;
    for (int i = 0; i < MAXN; i++) for (int j = 0; j < MAXN; j++) p[i][j] = 0;
    a = 1; b = n - 2; m = n / 2;
    case (which)
      0: begin // 'A': two legs, top bar, cross bar (one bubble, open at bottom)
        for (int i = a; i <= b; i++) begin p[i][a + 1] = 1; p[i][b - 1] = 1; end
        for (int j = a + 1; j <= b - 1; j++) begin p[a][j] = 1; p[m][j] = 1; end
      end
      1: begin // 'B'-like: two stacked boxes (two bubbles)
        for (int i = a; i <= b; i++) p[i][a] = 1;
        for (int j = a; j <= b - 1; j++) begin p[a][j] = 1; p[m][j] = 1; p[b][j] = 1; end
        for (int i = a; i <= b; i++) p[i][b - 1] = 1;
      end
      2: begin // 'C': open to the right
        for (int i = a + 1; i <= b - 1; i++) p[i][a] = 1;
        for (int j = a + 1; j <= b; j++) begin p[a][j] = 1; p[b][j] = 1; end
      end
      3: begin // 'U': open at the top
        for (int i = a; i <= b - 1; i++) begin p[i][a] = 1; p[i][b] = 1; end
        for (int j = a + 1; j <= b - 1; j++) p[b][j] = 1;
      end
      default: begin // random dots
        int unsigned s = seed;
        for (int i = 0; i < n; i++)
          for (int j = 0; j < n; j++) begin
            s = s * 1103515245 + 12345;
            p[i][j] = (s[20:18] == 3'b000);
          end
      end
    endcase
    return p;
  endfunction

  // Good-machine self-test signature of one PE, computed from the field
  // equations rather than the NOR plane: the input register steps through
  // the modified LFSR sequence from zero (feedback stage 4 ^ stage 7 ^
  // NOR(stages 1..6)), and each clock the BILBO, a Galois MISR with
  // x^12 + x^6 + x^4 + x + 1, adds the twelve field bits of the current state.
  function automatic logic [11:0] good_signature();
    logic [6:0]  s;
    logic [11:0] m, d;
    bit gb, gt, gr, gl, pv, ph, p;
    s = '0; m = '0;
    for (int t = 0; t < 128; t++) begin
      {p, ph, pv, gl, gr, gt, gb} = s;
      d[11] = p;
      d[10] = !(p || gl || gr || gt || gb);
      d[9]  = !p && gt && !gl && !gr && !gb;
      d[8]  = !p && gb && !gl && !gr && !gt;
      d[7]  = !p && gr && !gl && !gt && !gb;
      d[6]  = !p && gl && !gr && !gt && !gb;
      d[5]  = p && ph;
      d[4]  = p && pv;
      d[3]  = gr && gb;
      d[2]  = gl && gb;
      d[1]  = gr && gt;
      d[0]  = gl && gt;
      m = {m[10:0], 1'b0} ^ (m[11] ? 12'b0000_0101_0011 : 12'b0) ^ d;
      s = {s[5:0], s[3] ^ s[6] ^ (s[5:0] == 6'b0)};
    end
    return m;
  endfunction

endpackage
