// ehw_pkg - shared types and constants of the virtual reconfigurable circuit (VRC).
//
// The VRC is a second, programmable layer of logic: an array of ROWS x COLS two-input
// logic elements (LEs) whose functions and connections are set by a chromosome held in
// a configuration memory. The array size (20 LEs, 4 external inputs, 4 external
// outputs) and the seven fundamental gate functions follow the published design; the
// 4 x 5 row/column split, the gene layout and the function encoding are choices of
// this implementation.
//
// Chromosome layout (one gene = GENE_W bits, gene index g):
//   LE number e = col*ROWS + row (column-major), for e = 0 .. N_LE-1
//     g = 3e     : source of LE input A
//     g = 3e + 1 : source of LE input B
//     g = 3e + 2 : LE function (le_func_e)
//   g = 3*N_LE + k : LE number that drives external output k, k = 0 .. N_OUT-1
// A source gene of a column-0 LE names an external input (0 .. N_IN-1); a source gene of
// an LE in column c > 0 names any LE of columns 0 .. c-1 (0 .. c*ROWS-1). This makes
// feedback impossible and keeps external inputs on column 0 only.
package ehw_pkg;

  localparam int unsigned ROWS  = 4;   // LE rows    (assumed split of the 20 LEs)
  localparam int unsigned COLS  = 5;   // LE columns (assumed split of the 20 LEs)
  localparam int unsigned N_IN  = 4;   // external inputs
  localparam int unsigned N_OUT = 4;   // external outputs

  // Fixed-point scale of all fitness values: FIT_ONE means 100 %.
  localparam int unsigned FIT_W   = 17;
  localparam int unsigned FIT_ONE = 1 << 16;

  // Number of chromosome genes and gene width for an array of the given size.
  function automatic int unsigned n_genes(int unsigned rows, int unsigned cols,
                                          int unsigned n_out);
    return 3 * rows * cols + n_out;
  endfunction

  function automatic int unsigned gene_width(int unsigned rows, int unsigned cols,
                                             int unsigned n_in);
    int unsigned w;
    w = 3;                                   // function code needs 3 bits
    if ($clog2(rows * cols) > w) w = $clog2(rows * cols);
    if ($clog2(n_in) > w)        w = $clog2(n_in);
    return w;
  endfunction

  // LE functions: the seven fundamental gates, plus a wire (pass input A), which the
  // evolved phenotypes use to carry a signal across a column.
  typedef enum logic [2:0] {
    F_AND  = 3'd0,
    F_OR   = 3'd1,
    F_NOT  = 3'd2,   // NOT of input A
    F_NAND = 3'd3,
    F_NOR  = 3'd4,
    F_XOR  = 3'd5,
    F_XNOR = 3'd6,
    F_WIRE = 3'd7    // input A passed through
  } le_func_e;

endpackage
