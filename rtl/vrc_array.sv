// vrc_array - the LE array and programmable interconnection network of the VRC.
//
// ROWS x COLS logic elements are arranged in columns, as in Cartesian genetic
// programming. Column 0 LEs take their inputs from the external inputs only; an LE in
// column c > 0 may take either input from the output of any LE in an earlier column.
// Each external output is driven by any one LE. Because signals only move to later
// columns, no configuration can create a feedback loop, and an external input can never
// reach an external output without passing an LE. These rules follow the published
// design; "any earlier column" (rather than only the previous one) and the column-major
// LE numbering are this design's choices.
//
// Interface: ext_in - external inputs; genes - the chromosome (layout in ehw_pkg);
// ext_out - external outputs; le_out - every LE output (for observation);
// route_err - a routing gene named an illegal source (that input reads 0).
// Timing: combinational from ext_in and genes to ext_out; the critical path passes at
// most COLS LEs.
module vrc_array
  import ehw_pkg::*;
#(
  parameter int unsigned R     = ROWS,
  parameter int unsigned C     = COLS,
  parameter int unsigned NI    = N_IN,
  parameter int unsigned NO    = N_OUT,
  parameter int unsigned GW    = gene_width(R, C, NI),
  parameter int unsigned NG    = n_genes(R, C, NO)
) (
  input  logic [NI-1:0]         ext_in,
  input  logic [NG-1:0][GW-1:0] genes,
  output logic [NO-1:0]         ext_out,
  output logic [R*C-1:0]        le_out,
  output logic                  route_err
);

  localparam int unsigned NLE = R * C;

  logic [NLE-1:0] err_a, err_b;
  logic [NO-1:0]  err_o;

  // One generate block per column. Each column publishes `upto`, the outputs of itself
  // and of every earlier column (bit e = LE e), which is the candidate bus of the next
  // column; keeping one vector per column keeps the netlist visibly feed-forward.
  for (genvar c = 0; c < C; c++) begin : g_col
    localparam int unsigned NS = (c == 0) ? NI : c * R;  // candidates of this column
    logic [NS-1:0]      cand;
    logic [R-1:0]       y;
    logic [(c+1)*R-1:0] upto;

    if (c == 0) begin : g_c0
      assign cand = ext_in;
      assign upto = y;
    end else begin : g_cn
      assign cand = g_col[c-1].upto;
      assign upto = {y, g_col[c-1].upto};
    end

    for (genvar r = 0; r < R; r++) begin : g_row
      localparam int unsigned E = c * R + r;
      logic a, b;

      vrc_source_mux #(.N_SRC(NS), .SEL_W(GW)) u_mux_a (
        .src(cand), .sel(genes[3*E]),   .n_legal((GW+1)'(NS)), .y(a), .illegal(err_a[E]));
      vrc_source_mux #(.N_SRC(NS), .SEL_W(GW)) u_mux_b (
        .src(cand), .sel(genes[3*E+1]), .n_legal((GW+1)'(NS)), .y(b), .illegal(err_b[E]));

      vrc_le u_le (.a, .b, .func(le_func_e'(genes[3*E+2][2:0])), .y(y[r]));
    end
  end

  assign le_out = g_col[C-1].upto;

  for (genvar k = 0; k < NO; k++) begin : g_out
    vrc_source_mux #(.N_SRC(NLE), .SEL_W(GW)) u_mux_o (
      .src(le_out), .sel(genes[3*NLE+k]), .n_legal((GW+1)'(NLE)),
      .y(ext_out[k]), .illegal(err_o[k]));
  end

  assign route_err = |{err_a, err_b, err_o};

endmodule
