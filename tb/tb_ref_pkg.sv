// tb_ref_pkg - reference models used by the testbenches.
//
// Independent behavioural descriptions of the VRC (array of 4 x 5 LEs, gene layout as
// documented in ehw_pkg), of the evolution constraints and of the fitness function, plus
// helpers that build chromosomes: a random legal one, and the conventional 2 x 2-bit
// multiplier (four AND gates for the partial products and two half adders).
// Input vector bits: ext_in[1:0] = multiplicand A, ext_in[3:2] = multiplier B;
// the product's bit k appears on external output k.
package tb_ref_pkg;

  localparam int R = 4, C = 5, NI = 4, NO = 4, NLE = R * C, NG = 3 * NLE + NO, GW = 5;
  localparam int NV = 1 << NI;
  localparam int ONE = 65536;

  typedef logic [GW-1:0] gene_t;
  typedef gene_t chrom_t [NG];
  typedef logic [NO-1:0] table_t [NV];

  function automatic logic gate(int f, logic a, logic b);
    case (f)
      0: return a & b;
      1: return a | b;
      2: return !a;
      3: return !(a & b);
      4: return !(a | b);
      5: return a != b;
      6: return a == b;
      default: return a;
    endcase
  endfunction

  function automatic int n_legal(int e);
    return (e < R) ? NI : (e / R) * R;
  endfunction

  // evaluate the phenotype for one input vector; illegal sources read 0
  function automatic logic [NO-1:0] eval(const ref chrom_t ch, input logic [NI-1:0] x);
    logic le [NLE];
    logic [NO-1:0] y;
    for (int e = 0; e < NLE; e++) begin
      logic a, b;
      int sa, sb;
      sa = ch[3*e]; sb = ch[3*e+1];
      if (e < R) begin
        a = (sa < NI) ? x[sa] : 1'b0;
        b = (sb < NI) ? x[sb] : 1'b0;
      end else begin
        a = (sa < n_legal(e)) ? le[sa] : 1'b0;
        b = (sb < n_legal(e)) ? le[sb] : 1'b0;
      end
      le[e] = gate(int'(ch[3*e+2][2:0]), a, b);
    end
    for (int k = 0; k < NO; k++) y[k] = (ch[3*NLE+k] < NLE) ? le[ch[3*NLE+k]] : 1'b0;
    return y;
  endfunction

  function automatic bit legal(const ref chrom_t ch);
    for (int e = 0; e < NLE; e++) begin
      if (ch[3*e] == ch[3*e+1]) return 0;
      if (ch[3*e] >= n_legal(e) || ch[3*e+1] >= n_legal(e)) return 0;
    end
    for (int k = 0; k < NO; k++) begin
      if (ch[3*NLE+k] >= NLE) return 0;
      for (int j = 0; j < k; j++) if (ch[3*NLE+k] == ch[3*NLE+j]) return 0;
    end
    return 1;
  endfunction

  // one random gene that obeys the source-range rules
  function automatic gene_t rand_gene(int g);
    if (g >= 3 * NLE) return gene_t'($urandom_range(NLE - 1));
    if (g % 3 == 2)   return gene_t'($urandom_range(7));
    return gene_t'($urandom_range(n_legal(g / 3) - 1));
  endfunction

  // a random chromosome that obeys every constraint
  function automatic void rand_legal(ref chrom_t ch);
    for (int g = 0; g < NG; g++) ch[g] = rand_gene(g);
    for (int e = 0; e < NLE; e++)
      while (ch[3*e] == ch[3*e+1]) ch[3*e+1] = rand_gene(3*e+1);
    for (int k = 0; k < NO; k++) begin
      bit dup;
      do begin
        dup = 0;
        for (int j = 0; j < k; j++) if (ch[3*NLE+k] == ch[3*NLE+j]) dup = 1;
        if (dup) ch[3*NLE+k] = rand_gene(3*NLE+k);
      end while (dup);
    end
  endfunction

  // conventional 2 x 2-bit multiplier on the array
  function automatic void conv_mult(ref chrom_t ch);
    // unused LEs: AND of two distinct legal sources
    for (int e = 0; e < NLE; e++) begin
      ch[3*e] = 0; ch[3*e+1] = 1; ch[3*e+2] = 0;
    end
    // column 0: partial products   a0=x0 a1=x1 b0=x2 b1=x3
    ch[0] = 0; ch[1]  = 2; ch[2]  = 0;   // LE0 = a0 b0
    ch[3] = 1; ch[4]  = 2; ch[5]  = 0;   // LE1 = a1 b0
    ch[6] = 0; ch[7]  = 3; ch[8]  = 0;   // LE2 = a0 b1
    ch[9] = 1; ch[10] = 3; ch[11] = 0;   // LE3 = a1 b1
    // column 1: first half adder
    ch[12] = 1; ch[13] = 2; ch[14] = 5;  // LE4 = LE1 ^ LE2  (C1)
    ch[15] = 1; ch[16] = 2; ch[17] = 0;  // LE5 = LE1 & LE2  (carry)
    // column 2: second half adder
    ch[24] = 3; ch[25] = 5; ch[26] = 5;  // LE8 = LE3 ^ LE5  (C2)
    ch[27] = 3; ch[28] = 5; ch[29] = 0;  // LE9 = LE3 & LE5  (C3)
    ch[3*NLE+0] = 0; ch[3*NLE+1] = 4; ch[3*NLE+2] = 8; ch[3*NLE+3] = 9;
  endfunction

  function automatic void mult_table(ref table_t t);
    for (int v = 0; v < NV; v++) t[v] = NO'((v & 3) * ((v >> 2) & 3));
  endfunction

  // fitness of a phenotype output table against a target, same fixed point as the RTL:
  // every ratio floor(n * ONE / d); an empty true/false column counts ONE
  typedef struct {
    int vec_ok, elem_ok, ncp;
    int t_ok[NO], f_ok[NO], n_t[NO], n_f[NO];
    int f_elem, f_cp, f_ov, f_partial, f_overall, psum;
  } fit_t;

  function automatic fit_t fitness(const ref table_t got, const ref table_t want);
    fit_t r;
    r.vec_ok = 0; r.elem_ok = 0; r.ncp = 0; r.psum = 0;
    for (int k = 0; k < NO; k++) begin r.t_ok[k] = 0; r.f_ok[k] = 0; r.n_t[k] = 0; r.n_f[k] = 0; end
    for (int v = 0; v < NV; v++) begin
      if (got[v] == want[v]) r.vec_ok++;
      for (int k = 0; k < NO; k++) begin
        if (got[v][k] == want[v][k]) r.elem_ok++;
        if (want[v][k]) begin r.n_t[k]++; if (got[v][k]) r.t_ok[k]++; end
        else            begin r.n_f[k]++; if (!got[v][k]) r.f_ok[k]++; end
      end
    end
    for (int k = 0; k < NO; k++) begin
      if (r.t_ok[k] == r.n_t[k] && r.f_ok[k] == r.n_f[k]) r.ncp++;
      r.psum += (r.n_t[k] == 0) ? ONE : (r.t_ok[k] * ONE) / r.n_t[k];
      r.psum += (r.n_f[k] == 0) ? ONE : (r.f_ok[k] * ONE) / r.n_f[k];
    end
    r.f_elem    = (r.elem_ok * ONE) / (NV * NO);
    r.f_cp      = (r.ncp * ONE) / NO;
    r.f_ov      = (r.vec_ok * ONE) / NV;
    r.f_partial = r.psum / (2 * NO);
    r.f_overall = (6 * NO * r.f_elem + 8 * NO * r.f_cp + 3 * r.psum) / (20 * NO);
    return r;
  endfunction

endpackage
