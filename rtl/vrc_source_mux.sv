// vrc_source_mux - one switch of the VRC's programmable interconnection network.
//
// Selects one of N_SRC candidate signals by a routing gene. Only the first n_legal
// candidates may be chosen: for an LE in column c > 0 these are the outputs of all LEs in
// columns 0 .. c-1, for a column-0 LE the external inputs. A gene that names a signal
// outside that range selects constant 0 and raises `illegal`, so a damaged or random
// chromosome can never build a feedback loop. The feed-forward rule is the published
// design's; the "illegal selects 0" behaviour is this design's choice.
//
// Parameters: N_SRC - number of candidate signals; SEL_W - routing gene width.
// Interface: src - candidates, sel - routing gene, n_legal - number of legal candidates
// (a constant where instantiated), y - selected signal, illegal - gene out of range.
// Timing: combinational.
module vrc_source_mux #(
  parameter int unsigned N_SRC = 20,
  parameter int unsigned SEL_W = 5
) (
  input  logic [N_SRC-1:0]  src,
  input  logic [SEL_W-1:0]  sel,
  input  logic [SEL_W:0]    n_legal,
  output logic              y,
  output logic              illegal
);

  always_comb begin
    illegal = ({1'b0, sel} >= n_legal);
    y       = 1'b0;
    for (int unsigned i = 0; i < N_SRC; i++)
      if (sel == SEL_W'(i) && !illegal) y = src[i];
  end

endmodule
