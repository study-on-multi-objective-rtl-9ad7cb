// image_filter: streaming 3x3 image filter around the virtual reconfigurable
// circuit (see vrc_array). Every output pixel is computed from the matching
// input pixel and its eight neighbours; pixels on the image border are not
// filtered and leave unchanged, as in the source.
//
// Pixels of an IMG_W x IMG_H gray-scale frame enter in raster order, one per
// accepted beat (in_valid && in_ready). Two line buffers of IMG_W bytes delay
// the stream by one and two lines, and a 3x3 register window holds the
// neighbourhood; window position r*3+c drives VRC input I(r*3+c), so I4 is
// the centre pixel (the source's figure names inputs I0..I8; the raster order
// is this design's reading of it). A pixel's window is complete when the
// pixel one line and one column later has arrived; after the last pixel of a
// frame the block spends IMG_W+1 cycles draining the buffers with in_ready
// low, so a frame takes IMG_W*IMG_H + IMG_W + 1 cycles at one pixel a clock.
// Output pixels leave in raster order, two clocks after the beat that
// completes their window, with their row, column, an interior flag and a
// last-pixel flag. A side byte in_aux (for example the uncorrupted original
// pixel) travels with each pixel and leaves aligned with it on out_aux.
//
// Configuration (this design's own interface): cfg_we writes one CLB gene
// triplet cfg_data at CLB index cfg_addr; fault_we loads the fault mask that
// marks faulty CLBs; cfg_cur shows the configuration held. A 32-bit LFSR advancing every clock feeds the random
// values that faulty CLBs drive. After reset every CLB copies the centre pixel
// (gene (4,4,identity)) and no CLB is faulty, so the filter passes the image
// through. Writes take effect at once; change them between frames.
// Reset is synchronous, active low.
module image_filter
  import ehw_pkg::*;
#(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512,
  parameter int unsigned COLS  = 8,
  parameter int unsigned ROWS  = 4,
  localparam int unsigned NCLB = COLS * ROWS,
  localparam int unsigned AW   = $clog2(NCLB),
  localparam int unsigned XW   = $clog2(IMG_W),
  localparam int unsigned YW   = $clog2(IMG_H),
  localparam int unsigned NSTEP = IMG_W * IMG_H + IMG_W + 1,
  localparam int unsigned SW   = $clog2(NSTEP + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration
  input  logic             cfg_we,
  input  logic [AW-1:0]    cfg_addr,
  input  vrc_gene_t        cfg_data,
  input  logic             fault_we,
  input  logic [NCLB-1:0]  fault_data,
  // corrupted pixels in
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [PIX_W-1:0] in_pix,
  input  logic [PIX_W-1:0] in_aux,
  // filtered pixels out
  output logic             out_valid,
  output logic [PIX_W-1:0] out_pix,
  output logic [PIX_W-1:0] out_aux,
  output logic [YW-1:0]    out_row,
  output logic [XW-1:0]    out_col,
  output logic             out_interior,
  output logic             out_last,
  // configuration currently held, for cost evaluation
  output vrc_gene_t [NCLB-1:0] cfg_cur
);

  // ---------------- configuration registers ----------------
  vrc_gene_t [NCLB-1:0] cfg_q;
  logic [NCLB-1:0]      fault_q;
  logic [31:0]          lfsr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NCLB; k++) cfg_q[k] <= '{in1: 6'd4, in2: 6'd4, fn: FN_IDENT};
      fault_q <= '0;
      lfsr    <= 32'hACE1_2024;
    end else begin
      if (cfg_we && 32'(cfg_addr) < NCLB) cfg_q[cfg_addr] <= cfg_data;
      if (fault_we) fault_q <= fault_data;
      // Galois LFSR, polynomial x^32 + x^22 + x^2 + x + 1
      lfsr <= {1'b0, lfsr[31:1]} ^ (lfsr[0] ? 32'h8020_0003 : 32'h0);
    end
  end

  assign cfg_cur = cfg_q;

  // ---------------- stream control ----------------
  logic [SW-1:0] step_n;      // index of the newest pixel in the window
  logic          draining;
  logic          step;
  logic [PIX_W-1:0] new_pix, new_aux;

  assign in_ready = rst_n && !draining;
  assign step     = draining || (in_valid && in_ready);
  assign new_pix  = draining ? '0 : in_pix;
  assign new_aux  = draining ? '0 : in_aux;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      step_n   <= '0;
      draining <= 1'b0;
    end else if (step) begin
      if (32'(step_n) == NSTEP - 1) begin
        step_n   <= '0;
        draining <= 1'b0;
      end else begin
        step_n <= step_n + 1'b1;
        if (32'(step_n) == IMG_W * IMG_H - 1) draining <= 1'b1;
      end
    end
  end

  // ---------------- line buffers ----------------
  logic [PIX_W-1:0] lb1 [IMG_W];   // pixel stream delayed one line
  logic [PIX_W-1:0] lb2 [IMG_W];   // delayed two lines
  logic [PIX_W-1:0] lba [IMG_W];   // side byte delayed one line
  logic [XW-1:0]    lb_ptr;
  logic [PIX_W-1:0] lb1_q, lb2_q, lba_q;

  assign lb1_q = lb1[lb_ptr];
  assign lb2_q = lb2[lb_ptr];
  assign lba_q = lba[lb_ptr];

  always_ff @(posedge clk) begin
    if (step) begin
      lb1[lb_ptr] <= new_pix;
      lb2[lb_ptr] <= lb1_q;
      lba[lb_ptr] <= new_aux;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    lb_ptr <= '0;
    else if (step) lb_ptr <= (32'(lb_ptr) == IMG_W - 1) ? '0 : lb_ptr + 1'b1;
  end

  // ---------------- 3x3 window ----------------
  logic [2:0][2:0][PIX_W-1:0] win;   // win[row][col], col 2 newest
  logic [PIX_W-1:0] aux_d [2];      // side byte, aligned with win[1][1]
  logic             win_valid;
  logic [YW-1:0]    c_row;
  logic [XW-1:0]    c_col;
  logic             c_last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      win       <= '0;
      aux_d[0]  <= '0;
      aux_d[1]  <= '0;
      win_valid <= 1'b0;
      c_row     <= '0;
      c_col     <= '0;
      c_last    <= 1'b0;
    end else begin
      win_valid <= 1'b0;
      c_last    <= 1'b0;
      if (step) begin
        win[2] <= {new_pix, win[2][2:1]};
        win[1] <= {lb1_q,   win[1][2:1]};
        win[0] <= {lb2_q,   win[0][2:1]};
        aux_d[0] <= lba_q;
        aux_d[1] <= aux_d[0];
        if (32'(step_n) >= IMG_W + 1) begin
          // centre of the window just formed: pixel step_n - IMG_W - 1
          win_valid <= 1'b1;
          c_last    <= 32'(step_n) == NSTEP - 1;
          if (32'(step_n) == IMG_W + 1) begin
            c_row <= '0;
            c_col <= '0;
          end else if (32'(c_col) == IMG_W - 1) begin
            c_col <= '0;
            c_row <= c_row + 1'b1;
          end else begin
            c_col <= c_col + 1'b1;
          end
        end
      end
    end
  end

  // win[r] packs columns with index 0 = oldest (leftmost)
  logic [8:0][PIX_W-1:0] vrc_in;
  logic [PIX_W-1:0]      vrc_out;
  logic                  interior;

  always_comb begin
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        vrc_in[r*3 + c] = win[r][c];
  end

  vrc_array #(.COLS(COLS), .ROWS(ROWS), .NIN(9)) u_vrc (
    .pix        (vrc_in),
    .cfg        (cfg_q),
    .fault_mask (fault_q),
    .rnd        (lfsr),
    .out        (vrc_out)
  );

  assign interior = c_row != '0 && 32'(c_row) != IMG_H - 1 &&
                    c_col != '0 && 32'(c_col) != IMG_W - 1;

  // ---------------- output register ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid    <= 1'b0;
      out_pix      <= '0;
      out_aux      <= '0;
      out_row      <= '0;
      out_col      <= '0;
      out_interior <= 1'b0;
      out_last     <= 1'b0;
    end else begin
      out_valid    <= win_valid;
      out_pix      <= interior ? vrc_out : win[1][1];
      out_aux      <= aux_d[1];
      out_row      <= c_row;
      out_col      <= c_col;
      out_interior <= interior;
      out_last     <= c_last;
    end
  end

endmodule
