// vrc_array: the virtual reconfigurable circuit (VRC), a COLS x ROWS grid of
// 8-bit two-input CLBs (see vrc_clb) between NIN primary 8-bit inputs and one
// 8-bit output. The grid is configured by a chromosome, one gene triplet
// (in1, in2, function) per CLB, CLBs numbered column by column from the top.
// Selector values 0..NIN-1 name the primary inputs; NIN+k names the output of
// CLB k. Each CLB may read any primary input or any CLB of an earlier column
// (any distance back). The circuit output is the first CLB of the last
// column, so only one CLB of that column can matter.
//
// The grid shape, input count, numbering, connectivity rule and output
// position follow the source (8 x 4 with nine inputs for the main filter,
// 4 x 4 in the particle-swarm variant). This design's own choices: a selector
// that points at a CLB of the same or a later column, or past the last
// signal, reads zero; a CLB whose bit in fault_mask is set is faulty and
// drives a byte of the random word rnd instead of its function (CLB k takes
// rnd rotated right by k bits, low byte), so faulty blocks show unrelated,
// changing values when rnd changes every cycle.
//
// Purely combinational: out follows pix, cfg, fault_mask and rnd within the
// cycle.
module vrc_array
  import ehw_pkg::*;
#(
  parameter int unsigned COLS = 8,
  parameter int unsigned ROWS = 4,
  parameter int unsigned NIN  = 9,
  localparam int unsigned NCLB = COLS * ROWS,
  localparam int unsigned NSIG = NIN + NCLB
) (
  input  logic [NIN-1:0][PIX_W-1:0] pix,
  input  vrc_gene_t [NCLB-1:0]      cfg,
  input  logic [NCLB-1:0]           fault_mask,
  input  logic [31:0]               rnd,
  output logic [PIX_W-1:0]          out
);

  for (genvar c = 0; c < COLS; c++) begin : col
    // Signals this column may read; entries not yet produced stay zero.
    logic [NSIG-1:0][PIX_W-1:0] avail;
    logic [ROWS-1:0][PIX_W-1:0] z;

    if (c == 0) begin : g_first
      always_comb begin
        avail = '0;
        for (int i = 0; i < NIN; i++) avail[i] = pix[i];
      end
    end else begin : g_next
      always_comb begin
        avail = col[c-1].avail;
        for (int r = 0; r < ROWS; r++) avail[NIN + (c-1)*ROWS + r] = col[c-1].z[r];
      end
    end

    for (genvar r = 0; r < ROWS; r++) begin : row
      localparam int unsigned K     = c * ROWS + r;
      localparam int unsigned LIMIT = NIN + c * ROWS;
      logic [PIX_W-1:0] x, y;
      logic [31:0]      rr;

      always_comb begin
        x = (32'(cfg[K].in1) < LIMIT) ? avail[cfg[K].in1] : '0;
        y = (32'(cfg[K].in2) < LIMIT) ? avail[cfg[K].in2] : '0;
      end

      assign rr = (rnd >> (K % 32)) | (rnd << ((32 - K % 32) % 32));

      vrc_clb u_clb (
        .x         (x),
        .y         (y),
        .fn        (cfg[K].fn),
        .faulty    (fault_mask[K]),
        .fault_val (rr[PIX_W-1:0]),
        .z         (z[r])
      );
    end
  end

  assign out = col[COLS-1].z[0];

endmodule
