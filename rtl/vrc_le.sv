// vrc_le - one logic element (LE) of the virtual reconfigurable circuit.
//
// A purely combinational two-input cell. Its 3-bit function gene selects one of the
// seven fundamental gates (AND, OR, NOT, NAND, NOR, XOR, XNOR) or a wire that passes
// input A through. NOT and the wire use input A only. Limiting the cell to the seven
// fundamental gates follows the published design (it shrinks the search space of the
// genetic algorithm); the wire code and the numeric encoding are this design's choice.
//
// Interface: a, b - the two LE inputs; func - function gene; y - LE output.
// Timing: combinational, no clock.
module vrc_le
  import ehw_pkg::*;
(
  input  logic     a,
  input  logic     b,
  input  le_func_e func,
  output logic     y
);

  always_comb begin
    unique case (func)
      F_AND:  y = a & b;
      F_OR:   y = a | b;
      F_NOT:  y = ~a;
      F_NAND: y = ~(a & b);
      F_NOR:  y = ~(a | b);
      F_XOR:  y = a ^ b;
      F_XNOR: y = ~(a ^ b);
      F_WIRE: y = a;
      default: y = a;
    endcase
  end

endmodule
