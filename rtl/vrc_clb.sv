// vrc_clb: one configurable logic block of the virtual reconfigurable
// circuit. It takes two 8-bit operands x and y and applies one of sixteen
// functions chosen by a 4-bit code: constant 255, identity, inversion
// (255 - x), bitwise OR, (not x) OR y, AND, NAND, XOR, right shift by one and
// by two, nibble swap (x << 4 | y >> 4), modular addition, saturating
// addition, average ((x + y) >> 1 with the ninth carry bit kept) and
// maximum/minimum. The function set and its numbering are the source's; the
// block is purely combinational, so its result is valid in the same cycle.
//
// A CLB can be marked faulty. A faulty block ignores its function and drives
// the random byte on fault_val instead, the fault model of the fault-tolerance
// study; where that byte comes from is the enclosing array's choice.
module vrc_clb
  import ehw_pkg::*;
(
  input  logic [PIX_W-1:0] x,
  input  logic [PIX_W-1:0] y,
  input  vrc_fn_e          fn,
  input  logic             faulty,
  input  logic [PIX_W-1:0] fault_val,
  output logic [PIX_W-1:0] z
);

  logic [PIX_W:0]   sum;     // nine-bit sum for ADD, ADDS and AVG
  logic [PIX_W-1:0] f;

  assign sum = {1'b0, x} + {1'b0, y};

  always_comb begin
    unique case (fn)
      FN_CONST: f = '1;
      FN_IDENT: f = x;
      FN_INV:   f = 8'd255 - x;
      FN_OR:    f = x | y;
      FN_NOTXOR:  f = ~x | y;
      FN_AND:   f = x & y;
      FN_NAND:  f = ~(x & y);
      FN_XOR:   f = x ^ y;
      FN_SHR1:  f = x >> 1;
      FN_SHR2:  f = x >> 2;
      FN_SWAP:  f = {x[3:0], y[7:4]};
      FN_ADD:   f = sum[PIX_W-1:0];
      FN_ADDS:  f = sum[PIX_W] ? '1 : sum[PIX_W-1:0];
      FN_AVG:   f = sum[PIX_W:1];
      FN_MAX:   f = (x > y) ? x : y;
      FN_MIN:   f = (x < y) ? x : y;
    endcase
  end

  assign z = faulty ? fault_val : f;

endmodule
