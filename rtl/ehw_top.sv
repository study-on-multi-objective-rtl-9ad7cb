// ehw_top: the evolvable-hardware fabrics side by side, each with its
// configuration brought out to the optimizer that runs on a host.
//
// Image path (function level): corrupted pixels stream into image_filter,
// whose 8 x 4 VRC of 8-bit CLBs is set gene by gene through cfg_we/cfg_addr/
// cfg_data and whose faulty CLBs are marked through fault_we/fault_data. The
// original pixel travels with each corrupted pixel on in_aux, so f1_eval can
// sum |filtered - original| over the interior of the frame (F1; the mean
// difference per pixel is f1 / f1_count). vrc_cost_eval reports the CLB terms
// of the quality F2 (CLBs used, block complexity Cb and power Pb, wire power
// Pw and complexity Cw, critical-path delay with and without wires) of the
// configuration the filter holds.
//
// Gate path (gate level): a 5 x 5 gate array with five inputs and three
// outputs (the 2-bit full adder fabric) and a 4 x 4 array with four inputs
// (the 2-bit half adder fabric), each configured by a whole chromosome on
// ga5_cfg / ga4_cfg, with the F2 of that chromosome from gate_cost_eval.
// These are combinational; the image path is one pixel per clock (see
// image_filter for its timing). Reset is synchronous, active low.
module ehw_top
  import ehw_pkg::*;
#(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512,
  localparam int unsigned NCLB = 32,
  localparam int unsigned XW   = $clog2(IMG_W),
  localparam int unsigned YW   = $clog2(IMG_H),
  localparam int unsigned NG5  = 23,
  localparam int unsigned NG4  = 15
) (
  input  logic             clk,
  input  logic             rst_n,
  // VRC configuration
  input  logic             cfg_we,
  input  logic [4:0]       cfg_addr,
  input  vrc_gene_t        cfg_data,
  input  logic             fault_we,
  input  logic [NCLB-1:0]  fault_data,
  // pixel stream in: corrupted pixel and its original
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [PIX_W-1:0] in_pix,
  input  logic [PIX_W-1:0] in_orig,
  // filtered pixel stream out
  output logic             out_valid,
  output logic [PIX_W-1:0] out_pix,
  output logic [YW-1:0]    out_row,
  output logic [XW-1:0]    out_col,
  output logic             out_last,
  // F1 of each frame
  output logic             f1_done,
  output logic [31:0]      f1,
  output logic [19:0]      f1_count,
  // CLB cost terms of the held configuration
  output logic [7:0]       vrc_used,
  output logic [15:0]      vrc_cb,
  output logic [15:0]      vrc_pb,
  output logic [15:0]      vrc_pw,
  output logic [15:0]      vrc_cw,
  output logic [15:0]      vrc_delay,
  output logic [15:0]      vrc_sd_blk,
  // 5 x 5 gate array
  input  gate_gene_t [NG5-1:0] ga5_cfg,
  input  logic [4:0]       ga5_in,
  output logic [2:0]       ga5_out,
  output logic [15:0]      ga5_f2,
  // 4 x 4 gate array
  input  gate_gene_t [NG4-1:0] ga4_cfg,
  input  logic [3:0]       ga4_in,
  output logic [2:0]       ga4_out,
  output logic [15:0]      ga4_f2
);

  logic [PIX_W-1:0]     f_aux;
  logic                 f_interior;
  vrc_gene_t [NCLB-1:0] cfg_cur;

  image_filter #(.IMG_W(IMG_W), .IMG_H(IMG_H), .COLS(8), .ROWS(4)) u_filter (
    .clk, .rst_n,
    .cfg_we, .cfg_addr, .cfg_data, .fault_we, .fault_data,
    .in_valid, .in_ready, .in_pix, .in_aux(in_orig),
    .out_valid, .out_pix, .out_aux(f_aux), .out_row, .out_col,
    .out_interior(f_interior), .out_last, .cfg_cur
  );

  f1_eval u_f1 (
    .clk, .rst_n,
    .valid(out_valid), .fi(out_pix), .oi(f_aux), .interior(f_interior), .last(out_last),
    .done(f1_done), .f1(f1), .count(f1_count)
  );

  logic [NCLB-1:0] vrc_used_mask;
  vrc_cost_eval u_vrc_cost (
    .cfg(cfg_cur), .used(vrc_used_mask), .n_used(vrc_used), .cb(vrc_cb), .pb(vrc_pb),
    .pw(vrc_pw), .cw(vrc_cw), .sd(vrc_delay), .sd_blk(vrc_sd_blk)
  );

  gate_array u_ga5 (.in(ga5_in), .cfg(ga5_cfg), .out(ga5_out));
  logic [NG5-1:0] ga5_used;
  logic [15:0]    ga5_ec, ga5_ep, ga5_esd;
  gate_cost_eval u_ga5_cost (.cfg(ga5_cfg), .used(ga5_used), .ec_sum(ga5_ec), .ep_sum(ga5_ep),
                             .esd_sum(ga5_esd), .f2(ga5_f2));

  gate_array #(.COLS(4), .ROWS(4), .NIN(4), .NOUT(3)) u_ga4 (.in(ga4_in), .cfg(ga4_cfg), .out(ga4_out));
  logic [NG4-1:0] ga4_used;
  logic [15:0]    ga4_ec, ga4_ep, ga4_esd;
  gate_cost_eval #(.COLS(4), .ROWS(4), .NOUT(3)) u_ga4_cost (.cfg(ga4_cfg), .used(ga4_used),
      .ec_sum(ga4_ec), .ep_sum(ga4_ep), .esd_sum(ga4_esd), .f2(ga4_f2));

endmodule
