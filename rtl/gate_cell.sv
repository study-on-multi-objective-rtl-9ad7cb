// gate_cell: one cell of the gate-level reconfigurable array. It takes two
// one-bit inputs and applies the gate chosen by a 4-bit type code: NAND,
// NOR, XNOR, NOT of input 1, NOT of input 2, wire of input 1, wire of
// input 2, AND, OR, XOR (codes 0..9, the source's numbering). Codes 10..15
// are not defined by the source; this design drives 0 for them.
// Combinational.
module gate_cell
  import ehw_pkg::*;
(
  input  logic       a,
  input  logic       b,
  input  gate_type_e gt,
  output logic       y
);

  always_comb begin
    case (gt)
      GT_NAND:  y = ~(a & b);
      GT_NOR:   y = ~(a | b);
      GT_XNOR:  y = ~(a ^ b);
      GT_NOT1:  y = ~a;
      GT_NOT2:  y = ~b;
      GT_WIRE1: y = a;
      GT_WIRE2: y = b;
      GT_AND:   y = a & b;
      GT_OR:    y = a | b;
      GT_XOR:   y = a ^ b;
      default:  y = 1'b0;
    endcase
  end

endmodule
