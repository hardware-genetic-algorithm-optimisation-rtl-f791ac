// vrc_constraint_check - checks a chromosome against the evolution constraints.
//
// The genetic algorithm may only produce phenotypes that obey these rules:
//   1. the two inputs of an LE are distinct signals (same_in, one bit per LE);
//   4. no two external outputs are driven by the same LE (same_out);
//   5/6. every routing gene names a legal source: an external input for a column-0 LE,
//      an LE of an earlier column otherwise, any LE for an external output (bad_src).
// Rule 2 (seven fundamental gate functions) and rule 3 (no external input wired straight
// to an external output) hold for every chromosome by construction of the array. The
// rules are the published design's; checking them in hardware, next to the array, is this
// design's choice, so that a host can reject a faulty download.
//
// Interface: genes - chromosome (layout in ehw_pkg); ok - all rules hold.
// Timing: combinational.
module vrc_constraint_check
  import ehw_pkg::*;
#(
  parameter int unsigned R  = ROWS,
  parameter int unsigned C  = COLS,
  parameter int unsigned NI = N_IN,
  parameter int unsigned NO = N_OUT,
  parameter int unsigned GW = gene_width(R, C, NI),
  parameter int unsigned NG = n_genes(R, C, NO)
) (
  input  logic [NG-1:0][GW-1:0] genes,
  output logic [R*C-1:0]        same_in,
  output logic                  same_out,
  output logic                  bad_src,
  output logic                  ok
);

  localparam int unsigned NLE = R * C;

  always_comb begin
    same_in  = '0;
    same_out = 1'b0;
    bad_src  = 1'b0;
    for (int unsigned e = 0; e < NLE; e++) begin
      int unsigned n_legal;
      n_legal    = (e < R) ? NI : (e / R) * R;
      same_in[e] = (genes[3*e] == genes[3*e+1]);
      if (32'(genes[3*e]) >= n_legal || 32'(genes[3*e+1]) >= n_legal) bad_src = 1'b1;
    end
    for (int unsigned k = 0; k < NO; k++) begin
      if (32'(genes[3*NLE+k]) >= NLE) bad_src = 1'b1;
      for (int unsigned j = k + 1; j < NO; j++)
        if (genes[3*NLE+k] == genes[3*NLE+j]) same_out = 1'b1;
    end
    ok = !(|same_in) && !same_out && !bad_src;
  end

endmodule
