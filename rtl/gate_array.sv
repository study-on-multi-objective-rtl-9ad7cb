// gate_array: gate-level reconfigurable array, a COLS x ROWS grid of
// two-input gate cells (see gate_cell) configured by a chromosome of
// (in1, in2, gate type) triplets, one per gate, gates numbered column by
// column from the top (G0 is column 1, row 0).
//
// Selector meaning follows the source: a gate of the first column reads
// primary input in1/in2 (0..NIN-1); a gate of any later column reads the
// output of gate Gm with m = selector, and may read any gate of any earlier
// column. The outputs are the first NOUT gates of the last column, so the
// remaining ROWS-NOUT gates there are not part of the chromosome, which has
// NGATE = (COLS-1)*ROWS + NOUT triplets. Defaults are the 5 x 5 array with
// five inputs and three outputs used for the 2-bit full adder (inputs c0, a0,
// a1, b0, b1 on rows 0..4, outputs s0, s1, c1); the 4 x 4 array with four
// inputs of the half-adder study is the same module with COLS=ROWS=NIN=4.
//
// This design's choice: a selector beyond the signals a gate may read gives 0.
// Combinational.
module gate_array
  import ehw_pkg::*;
#(
  parameter int unsigned COLS = 5,
  parameter int unsigned ROWS = 5,
  parameter int unsigned NIN  = 5,
  parameter int unsigned NOUT = 3,
  localparam int unsigned NGATE = (COLS - 1) * ROWS + NOUT
) (
  input  logic [NIN-1:0]         in,
  input  gate_gene_t [NGATE-1:0] cfg,
  output logic [NOUT-1:0]        out
);

  // Index width of the signal vectors; in-range selectors always fit it.
  localparam int unsigned AW = (NGATE > 1) ? $clog2(NGATE) : 1;

  for (genvar c = 0; c < COLS; c++) begin : col
    localparam int unsigned NR = (c == COLS - 1) ? NOUT : ROWS;
    // Signals this column may read: primary inputs for column 0, otherwise
    // the outputs of all earlier gates (unused entries stay zero).
    logic [NGATE-1:0] avail;
    logic [NR-1:0]    g;

    if (c == 0) begin : g_first
      always_comb begin
        avail = '0;
        for (int i = 0; i < NIN; i++) avail[i] = in[i];
      end
    end else if (c == 1) begin : g_second
      always_comb begin
        avail = '0;
        for (int r = 0; r < ROWS; r++) avail[r] = col[0].g[r];
      end
    end else begin : g_next
      always_comb begin
        avail = col[c-1].avail;
        for (int r = 0; r < ROWS; r++) avail[(c-1)*ROWS + r] = col[c-1].g[r];
      end
    end

    for (genvar r = 0; r < NR; r++) begin : row
      localparam int unsigned K     = c * ROWS + r;
      localparam int unsigned LIMIT = (c == 0) ? NIN : c * ROWS;
      logic a, b;
      always_comb begin
        a = (32'(cfg[K].in1) < LIMIT) ? avail[AW'(cfg[K].in1)] : 1'b0;
        b = (32'(cfg[K].in2) < LIMIT) ? avail[AW'(cfg[K].in2)] : 1'b0;
      end
      gate_cell u_gate (.a(a), .b(b), .gt(cfg[K].gt), .y(g[r]));
    end
  end

  assign out = col[COLS-1].g;

endmodule
