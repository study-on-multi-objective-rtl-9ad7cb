// vrc_cost_eval: the circuit-quality terms of F2 for a VRC chromosome (see
// vrc_array):
//   n_used  number of CLBs that reach the output
//   cb, pb  sums of the function complexities (Cb) and powers (Pb) of those CLBs
//   pw, cw  sums of the wire powers (Pw) and wire complexities (Cw) of the
//           wires that feed them
//   sd      signal delay of the slowest path from a primary input to the
//           output CLB, wires included
//   sd_blk  the same path delay counting the CLBs only
//
// A CLB is used if it is the output CLB or a used CLB reads it through an
// operand its function depends on (the constant reads none; identity,
// inversion and the shifts read only x). Only operands a used CLB reads carry
// a wire. A wire joins the source pin (a primary input, or a CLB output) to
// the CLB input pin; its length is the Manhattan distance on the pin grid
// described in ehw_pkg, and per wire
//   Pw += L,  Cw += floor(16 L / 10),  delay = ceil(2 L / 10).
// No wire is charged from the output CLB to the circuit output. A selector
// the CLB may not read carries no wire and arrives at time 0, like a primary
// input.
//
// The function figures, the wire row of the cost table, the x positions of
// the pins and the y positions of the nine inputs are the source's (the
// latter two printed for the four-column array and continued here at the
// same 10-unit pitch for eight columns). The y positions of CLB pins, the
// Manhattan length and the rounding are this design's reading; together they
// reproduce the published Pw, Cw and SD of the published evolved filters.
// The rounding helper div5 is exact while 8 L < 1024, which holds up to nine
// columns. Combinational.
module vrc_cost_eval
  import ehw_pkg::*;
#(
  parameter int unsigned COLS = 8,
  parameter int unsigned ROWS = 4,
  parameter int unsigned NIN  = 9,
  localparam int unsigned NCLB = COLS * ROWS
) (
  input  vrc_gene_t [NCLB-1:0] cfg,
  output logic [NCLB-1:0]      used,
  output logic [7:0]           n_used,
  output logic [15:0]          cb,
  output logic [15:0]          pb,
  output logic [15:0]          pw,
  output logic [15:0]          cw,
  output logic [15:0]          sd,
  output logic [15:0]          sd_blk
);

  localparam int unsigned OUT_K = (COLS - 1) * ROWS;
  localparam int unsigned Y0    = 10 * ROWS - 4;

  // index k of the CLB a selector names, or -1 for a primary input or a
  // selector the CLB may not read
  function automatic int src_clb(int unsigned k, logic [VRC_IDX_W-1:0] sel);
    int unsigned limit = NIN + (k / ROWS) * ROWS;
    if (32'(sel) < NIN || 32'(sel) >= limit) return -1;
    return int'(sel) - int'(NIN);
  endfunction

  // length of the wire into input pin `pin` (0: in1, 1: in2) of CLB k from
  // the signal `sel`; 0 when the CLB may not read it
  function automatic int unsigned wire_len(int unsigned k, int unsigned pin,
                                           logic [VRC_IDX_W-1:0] sel);
    int unsigned limit = NIN + (k / ROWS) * ROWS;
    int unsigned px, py, sx, sy, s;
    px = 2 + 10 * (k / ROWS);
    py = Y0 - 10 * (k % ROWS) - 2 * pin;
    if (32'(sel) >= limit) return 0;
    if (32'(sel) < NIN) begin
      sx = 0;
      sy = vrc_in_y(32'(sel));
    end else begin
      s  = 32'(sel) - NIN;
      sx = 8 + 10 * (s / ROWS);
      sy = Y0 - 1 - 10 * (s % ROWS);
    end
    return ((px > sx) ? px - sx : sx - px) + ((py > sy) ? py - sy : sy - py);
  endfunction

  always_comb begin
    int s;
    s    = -1;
    used = '0;
    used[OUT_K] = 1'b1;
    for (int k = NCLB - 1; k >= 0; k--) begin
      if (used[k]) begin
        if (vrc_uses_x(cfg[k].fn)) begin
          s = src_clb(k, cfg[k].in1);
          if (s >= 0) used[s] = 1'b1;
        end
        if (vrc_uses_y(cfg[k].fn)) begin
          s = src_clb(k, cfg[k].in2);
          if (s >= 0) used[s] = 1'b1;
        end
      end
    end
  end

  always_comb begin
    int unsigned arr [NCLB];     // arrival at CLB outputs, wires included
    int unsigned ab  [NCLB];     // arrival counting CLB delays only
    int unsigned a, b, a0, b0, n, c, p, wp, wc, l1, l2;
    int s;
    s = -1;
    for (int k = 0; k < NCLB; k++) begin
      arr[k] = 0;
      ab[k]  = 0;
    end
    n = 0; c = 0; p = 0; wp = 0; wc = 0;
    for (int k = 0; k < NCLB; k++) begin
      a = 0; b = 0; a0 = 0; b0 = 0; l1 = 0; l2 = 0;
      if (vrc_uses_x(cfg[k].fn)) begin
        l1 = wire_len(k, 0, cfg[k].in1);
        a  = 32'(div5(10'(l1 * (WIRE_SD / 2) + 4)));
        s  = src_clb(k, cfg[k].in1);
        if (s >= 0) begin
          a  += arr[s];
          a0 = ab[s];
        end
      end
      if (vrc_uses_y(cfg[k].fn)) begin
        l2 = wire_len(k, 1, cfg[k].in2);
        b  = 32'(div5(10'(l2 * (WIRE_SD / 2) + 4)));
        s  = src_clb(k, cfg[k].in2);
        if (s >= 0) begin
          b  += arr[s];
          b0 = ab[s];
        end
      end
      arr[k] = vrc_sd(cfg[k].fn) + ((a > b) ? a : b);
      ab[k]  = vrc_sd(cfg[k].fn) + ((a0 > b0) ? a0 : b0);
      if (used[k]) begin
        n  += 1;
        c  += vrc_fc(cfg[k].fn);
        p  += vrc_fp(cfg[k].fn);
        wp += (l1 + l2) * (WIRE_FP / 10);
        wc += 32'(div5(10'(l1 * (WIRE_FC / 2)))) + 32'(div5(10'(l2 * (WIRE_FC / 2))));
      end
    end
    n_used = 8'(n);
    cb     = 16'(c);
    pb     = 16'(p);
    pw     = 16'(wp);
    cw     = 16'(wc);
    sd     = 16'(arr[OUT_K]);
    sd_blk = 16'(ab[OUT_K]);
  end

endmodule
