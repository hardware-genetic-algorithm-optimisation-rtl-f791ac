// evo_platform - the evaluation platform for extrinsic hardware evolution.
//
// A host running the genetic algorithm downloads each candidate chromosome into the
// VRC, pulses eval_start and reads back the phenotype's fitness. Inside, the chromosome
// is checked against the evolution constraints, the truth-table tester applies all
// 2**NI input vectors to the configured VRC, and the fitness calculator turns the
// resulting counts into the overall fitness (Equation 5) and its parts. Outside an
// evaluation the VRC computes ext_out from ext_in, so the evolved circuit can be used.
// The VRC, the sequential truth-table test and the fitness function follow the published
// design; there the test and the fitness arithmetic ran on the host, here they are
// hardware so that the host only has to download genes and read one number.
//
// Interface: cfg_* - gene download and read-back; target - desired output vector per
// input vector; eval_start (pulse) - evaluate the current chromosome; eval_busy; eval_done
// (pulse) - fitness outputs valid; chrom_ok - the chromosome obeys all constraints;
// ext_in/ext_out - use of the evolved circuit when not evaluating.
// Timing: eval_done follows eval_start after 2**NI + 2 cycles of testing plus the fitness
// arithmetic (at most 462 cycles in all for the default size).
module evo_platform
  import ehw_pkg::*;
#(
  parameter int unsigned R  = ROWS,
  parameter int unsigned C  = COLS,
  parameter int unsigned NI = N_IN,
  parameter int unsigned NO = N_OUT,
  parameter int unsigned GW = gene_width(R, C, NI),
  parameter int unsigned NG = n_genes(R, C, NO),
  parameter int unsigned AW = $clog2(NG),
  parameter int unsigned NV = 1 << NI,
  parameter int unsigned CW = $clog2(NV * NO + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_we,
  input  logic [AW-1:0]         cfg_waddr,
  input  logic [GW-1:0]         cfg_wdata,
  input  logic [AW-1:0]         cfg_raddr,
  output logic [GW-1:0]         cfg_rdata,
  input  logic [NV-1:0][NO-1:0] target,
  input  logic                  eval_start,
  output logic                  eval_busy,
  output logic                  eval_done,
  output logic                  chrom_ok,
  output logic [FIT_W-1:0]      f_overall,
  output logic [FIT_W-1:0]      f_elem,
  output logic [FIT_W-1:0]      f_cp,
  output logic [FIT_W-1:0]      f_partial,
  output logic [FIT_W-1:0]      f_ov,
  output logic [NO-1:0]         cp_ok,
  input  logic [NI-1:0]         ext_in,
  output logic [NO-1:0]         ext_out
);

  logic [NG-1:0][GW-1:0] genes;
  logic [NI-1:0]         vrc_in, test_vec;
  logic [NO-1:0]         vrc_out;
  logic                  route_err;
  logic                  t_busy, t_done, f_busy;
  logic [CW-1:0]         vec_ok, elem_ok;
  logic [NO-1:0][CW-1:0] t_ok, f_ok, n_t, n_f;
  logic [R*C-1:0]        same_in;
  logic                  same_out, bad_src, rules_ok;

  vrc #(.R(R), .C(C), .NI(NI), .NO(NO), .GW(GW), .NG(NG), .AW(AW)) u_vrc (
    .clk, .rst_n, .cfg_we, .cfg_waddr, .cfg_wdata, .cfg_raddr, .cfg_rdata,
    .ext_in(vrc_in), .ext_out(vrc_out), .genes, .route_err);

  vrc_constraint_check #(.R(R), .C(C), .NI(NI), .NO(NO), .GW(GW), .NG(NG)) u_chk (
    .genes, .same_in, .same_out, .bad_src, .ok(rules_ok));

  tt_tester #(.NI(NI), .NO(NO), .NV(NV), .CW(CW)) u_test (
    .clk, .rst_n, .start(eval_start && !eval_busy), .target, .vec_in(test_vec),
    .vrc_out, .busy(t_busy), .done(t_done),
    .vec_ok, .elem_ok, .cp_ok, .t_ok, .f_ok, .n_t, .n_f);

  fitness_calc #(.NI(NI), .NO(NO), .NV(NV), .CW(CW)) u_fit (
    .clk, .rst_n, .start(t_done), .vec_ok, .elem_ok, .cp_ok, .t_ok, .f_ok, .n_t, .n_f,
    .busy(f_busy), .done(eval_done),
    .f_elem, .f_cp, .f_partial, .f_overall, .f_ov);

  assign eval_busy = t_busy || t_done || f_busy;
  assign vrc_in    = t_busy ? test_vec : ext_in;
  assign ext_out   = t_busy ? '0 : vrc_out;
  assign chrom_ok  = rules_ok && !route_err;

  // the configuration must not change while it is being tested
  assert property (@(posedge clk) disable iff (!rst_n) t_busy |-> !cfg_we)
    else $error("evo_platform: chromosome written during a test");

endmodule
