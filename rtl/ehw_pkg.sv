// ehw_pkg: types and constant tables shared by the evolvable-hardware blocks.
//
// Two reconfigurable fabrics are described here. The function-level fabric
// (virtual reconfigurable circuit, VRC) is a grid of 8-bit two-input
// configurable logic blocks (CLBs); each CLB is set by a gene triplet
// (in1, in2, function). Inputs 0..8 are the nine window pixels, index 9+k is
// the output of CLB k, CLBs numbered column by column. The gate-level fabric
// is a grid of one-bit two-input gates set by triplets (in1, in2, gate type).
//
// The function list and its complexity/power/delay figures (FC, FP, SD) and
// the gate list with its EC/EP/ESD figures are the source's tables. The
// field widths of the triplets are this design's choice (6 bits reach 64
// signals, enough for the 8x4 grid; 5 bits reach the 25 gates of 5x5).
package ehw_pkg;

  localparam int unsigned PIX_W     = 8;   // gray-scale pixel width
  localparam int unsigned VRC_IDX_W = 6;   // width of a CLB input selector
  localparam int unsigned GA_IDX_W  = 5;   // width of a gate input selector

  // CLB functions (function ID of the source's function table)
  typedef enum logic [3:0] {
    FN_CONST = 4'd0,   // 255
    FN_IDENT = 4'd1,   // x
    FN_INV   = 4'd2,   // 255 - x
    FN_OR    = 4'd3,   // x | y
    FN_NOTXOR = 4'd4,   // ~x | y
    FN_AND   = 4'd5,   // x & y
    FN_NAND  = 4'd6,   // ~(x & y)
    FN_XOR   = 4'd7,   // x ^ y
    FN_SHR1  = 4'd8,   // x >> 1
    FN_SHR2  = 4'd9,   // x >> 2
    FN_SWAP  = 4'd10,  // (x << 4) | (y >> 4)
    FN_ADD   = 4'd11,  // x + y (mod 256)
    FN_ADDS  = 4'd12,  // x + y saturated at 255
    FN_AVG   = 4'd13,  // (x + y) >> 1
    FN_MAX   = 4'd14,  // max(x, y)
    FN_MIN   = 4'd15   // min(x, y)
  } vrc_fn_e;

  typedef struct packed {
    logic [VRC_IDX_W-1:0] in1;
    logic [VRC_IDX_W-1:0] in2;
    vrc_fn_e              fn;
  } vrc_gene_t;

  // Gate types of the gate-level fabric
  typedef enum logic [3:0] {
    GT_NAND  = 4'd0,
    GT_NOR   = 4'd1,
    GT_XNOR  = 4'd2,
    GT_NOT1  = 4'd3,   // NOT(in1)
    GT_NOT2  = 4'd4,   // NOT(in2)
    GT_WIRE1 = 4'd5,   // WIRE(in1)
    GT_WIRE2 = 4'd6,   // WIRE(in2)
    GT_AND   = 4'd7,
    GT_OR    = 4'd8,
    GT_XOR   = 4'd9
  } gate_type_e;

  typedef struct packed {
    logic [GA_IDX_W-1:0] in1;
    logic [GA_IDX_W-1:0] in2;
    gate_type_e          gt;
  } gate_gene_t;

  // Function complexity FC of a CLB function.
  function automatic int unsigned vrc_fc(vrc_fn_e f);
    case (f)
      FN_CONST: return 8;    FN_IDENT: return 16;  FN_INV:  return 24;
      FN_OR:    return 32;   FN_NOTXOR:  return 40;  FN_AND:  return 32;
      FN_NAND:  return 40;   FN_XOR:   return 64;  FN_SHR1: return 15;
      FN_SHR2:  return 14;   FN_SWAP:  return 16;  FN_ADD:  return 358;
      FN_ADDS:  return 367;  FN_AVG:   return 350; FN_MAX:  return 240;
      default:  return 240;  // FN_MIN
    endcase
  endfunction

  // Function power FP of a CLB function.
  function automatic int unsigned vrc_fp(vrc_fn_e f);
    case (f)
      FN_CONST: return 5;    FN_IDENT: return 10;  FN_INV:  return 15;
      FN_OR:    return 20;   FN_NOTXOR:  return 25;  FN_AND:  return 20;
      FN_NAND:  return 25;   FN_XOR:   return 38;  FN_SHR1: return 9;
      FN_SHR2:  return 8;    FN_SWAP:  return 10;  FN_ADD:  return 215;
      FN_ADDS:  return 220;  FN_AVG:   return 210; FN_MAX:  return 145;
      default:  return 145;  // FN_MIN
    endcase
  endfunction

  // Signal delay SD of a CLB function.
  function automatic int unsigned vrc_sd(vrc_fn_e f);
    case (f)
      FN_CONST: return 1;   FN_IDENT: return 2;   FN_INV:  return 3;
      FN_OR:    return 3;   FN_NOTXOR:  return 4;   FN_AND:  return 3;
      FN_NAND:  return 4;   FN_XOR:   return 4;   FN_SHR1: return 2;
      FN_SHR2:  return 2;   FN_SWAP:  return 2;   FN_ADD:  return 18;
      FN_ADDS:  return 19;  FN_AVG:   return 18;  FN_MAX:  return 16;
      default:  return 16;  // FN_MIN
    endcase
  endfunction

  // Wires of the VRC. Pins sit on a grid: primary input Ij enters at x = 0;
  // CLB column c has its input pins at x = 2 + 10c and its output pin at
  // x = 8 + 10c; CLB row r (rows counted from the top) has in1 at
  // y = Y0 - 10r, in2 two units lower and the output one unit lower, with
  // Y0 = 10*ROWS - 4. A wire's length L is the Manhattan distance between the
  // pins it joins. Its figures are the table's wire row (complexity 16,
  // power 10, delay 2) per 10 units of length: complexity and power are
  // rounded down, delay is rounded up.
  localparam int unsigned WIRE_FC = 16;
  localparam int unsigned WIRE_FP = 10;
  localparam int unsigned WIRE_SD = 2;

  // y of primary input j, as placed for the nine-input filter
  function automatic int unsigned vrc_in_y(int unsigned j);
    case (j)
      0: return 36;  1: return 34;  2: return 26;  3: return 24;
      4: return 16;  5: return 14;  6: return 6;   7: return 4;
      default: return 2;
    endcase
  endfunction

  // floor(x / 5) for x < 1024, by multiplying with 205/1024
  function automatic logic [9:0] div5(logic [9:0] x);
    logic [17:0] m;
    m = 18'(x) * 18'd205;
    return 10'(m >> 10);
  endfunction

  // Does a CLB function read its first / second operand?
  function automatic logic vrc_uses_x(vrc_fn_e f);
    return f != FN_CONST;
  endfunction
  function automatic logic vrc_uses_y(vrc_fn_e f);
    case (f)
      FN_CONST, FN_IDENT, FN_INV, FN_SHR1, FN_SHR2: return 1'b0;
      default: return 1'b1;
    endcase
  endfunction

  // Gate complexity GC, power and delay SD; the evaluations are 10 - value.
  // An unused gate is evaluated 20 on all three counts.
  localparam int unsigned GATE_UNUSED_EVAL = 20;

  function automatic int unsigned gate_gc(gate_type_e t);
    case (t)
      GT_NAND, GT_NOR:   return 4;
      GT_XNOR, GT_XOR:   return 8;
      GT_NOT1, GT_NOT2:  return 2;
      GT_WIRE1, GT_WIRE2:return 0;
      default:           return 6;   // AND, OR
    endcase
  endfunction
  function automatic int unsigned gate_pw(gate_type_e t);
    case (t)
      GT_NAND, GT_NOR:   return 3;
      GT_XNOR, GT_XOR:   return 4;
      GT_NOT1, GT_NOT2:  return 2;
      GT_WIRE1, GT_WIRE2:return 6;
      default:           return 5;
    endcase
  endfunction
  function automatic int unsigned gate_sd(gate_type_e t);
    case (t)
      GT_NAND, GT_NOR:   return 4;
      GT_XNOR, GT_XOR:   return 6;
      GT_NOT1, GT_NOT2:  return 3;
      GT_WIRE1, GT_WIRE2:return 8;
      default:           return 7;
    endcase
  endfunction

  function automatic logic gate_uses_1(gate_type_e t);
    return !(t == GT_NOT2 || t == GT_WIRE2);
  endfunction
  function automatic logic gate_uses_2(gate_type_e t);
    return !(t == GT_NOT1 || t == GT_WIRE1);
  endfunction

endpackage
