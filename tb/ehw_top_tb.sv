// ehw_top_tb: end-to-end run of the whole design at a reduced frame size
// (16 x 12; the design's default is 512 x 512, see ehw_top_full_tb).
//  * Image path: a smooth test image with 5% salt-and-pepper noise streams
//    through the filter, first with the reset (pass-through) configuration,
//    then with the published best evolved filter written gene by gene, then
//    with two faulty CLBs the filter does not use, then with the output CLB
//    faulty. Each frame's F1 and pixel count are compared with a model of
//    the filter written here; the cost terms of the held configuration are
//    compared with the published ones (12 CLBs, Cb 2208, Pb 1331).
//  * Gate path: the published 2-bit full adder (fitness 728) and half adder
//    (fitness 501) chromosomes must add on every input, and their F2 must be
//    628 and 401 (fitness minus the full-correctness score 100).
// Mechanisms counted, each must occur: reconfiguration writes, input stalls
// while the line buffers drain, border pixels passed unfiltered, faulty-CLB
// frames, F1 results, filtered pixels differing from their noisy input.
module ehw_top_tb;
  import ehw_pkg::*;

  localparam int W = 16, H = 12;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0; logic [4:0] cfg_addr = '0; vrc_gene_t cfg_data = '0;
  logic fault_we = 0; logic [31:0] fault_data = '0;
  logic in_valid = 0, in_ready; logic [7:0] in_pix = '0, in_orig = '0;
  logic out_valid, out_last; logic [7:0] out_pix;
  logic [3:0] out_row; logic [3:0] out_col;
  logic f1_done; logic [31:0] f1; logic [19:0] f1_count;
  logic [7:0] vrc_used; logic [15:0] vrc_cb, vrc_pb, vrc_pw, vrc_cw, vrc_delay, vrc_sd_blk;
  gate_gene_t [22:0] ga5_cfg; logic [4:0] ga5_in; logic [2:0] ga5_out; logic [15:0] ga5_f2;
  gate_gene_t [14:0] ga4_cfg; logic [3:0] ga4_in; logic [2:0] ga4_out; logic [15:0] ga4_f2;

  ehw_top #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  int ga_best[96] = '{4,6,1, 1,7,15, 3,8,15, 4,1,9, 12,11,9, 0,0,0, 0,0,0, 0,0,0, 0,0,0,
                      13,9,11, 0,0,0, 0,0,0, 16,19,0, 0,0,0, 0,0,0, 0,0,0, 21,13,11, 0,0,0,
                      0,0,0, 18,11,14, 10,28,14, 0,0,0, 0,0,0, 0,0,0, 25,9,14,
                      0,0,0, 0,0,0, 0,0,0, 29,33,15, 0,0,0, 0,0,0, 0,0,0};
  int c728[69] = '{2,4,9, 2,4,0, 0,1,9, 0,1,0, 3,3,5, 1,0,0, 3,0,2, 3,1,2, 3,2,8, 2,4,0,
                   5,3,4, 9,3,0, 8,9,6, 0,8,9, 3,6,9, 8,7,2, 12,0,0, 9,10,7, 0,11,0, 12,1,2,
                   2,4,9, 0,11,9, 1,18,0};
  int c501[45] = '{0,2,2, 0,2,7, 1,3,1, 1,3,2, 3,2,5, 0,0,5, 3,0,5, 1,3,1, 1,6,9, 4,2,6,
                   3,6,1, 5,7,4, 0,6,3, 1,3,2, 2,7,1};

  int cur[96];
  int img[H][W], org[H][W];
  int exp_f1, exp_cnt;
  int n_cfg_writes, n_stall, n_border, n_fault_frames, n_f1, n_changed;
  bit faulty_out;

  function automatic int fref(int f, int a, int b);
    case (f)
      0: return 255;               1: return a;
      2: return 255 - a;           3: return a | b;
      4: return (~a | b) & 255;    5: return a & b;
      6: return (~(a & b)) & 255;  7: return a ^ b;
      8: return a >> 1;            9: return a >> 2;
      10: return ((a << 4) & 255) | (b >> 4);
      11: return (a + b) & 255;    12: return (a + b > 255) ? 255 : a + b;
      13: return (a + b) >> 1;     14: return (a > b) ? a : b;
      default: return (a < b) ? a : b;
    endcase
  endfunction

  function automatic int filt(int r, int c);
    int v[41];
    if (r == 0 || c == 0 || r == H - 1 || c == W - 1) return img[r][c];
    for (int i = 0; i < 9; i++) v[i] = img[r - 1 + i / 3][c - 1 + i % 3];
    for (int k = 0; k < 32; k++) begin
      int lim = 9 + (k / 4) * 4;
      int a = (cur[3*k] < lim) ? v[cur[3*k]] : 0;
      int b = (cur[3*k+1] < lim) ? v[cur[3*k+1]] : 0;
      v[9 + k] = fref(cur[3*k+2], a, b);
    end
    return v[37];
  endfunction

  task automatic make_image();
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        org[r][c] = 60 + 6 * r + 4 * c;
        case ($urandom_range(0, 39))
          0: img[r][c] = 0;
          1: img[r][c] = 255;
          default: img[r][c] = org[r][c];
        endcase
      end
    exp_f1 = 0; exp_cnt = 0;
    for (int r = 1; r < H - 1; r++)
      for (int c = 1; c < W - 1; c++) begin
        int d = filt(r, c) - org[r][c];
        exp_f1 += (d < 0) ? -d : d;
        exp_cnt++;
      end
  endtask

  task automatic run_frame();
    int nd = n_f1;
    for (int i = 0; i < W * H; i++) begin
      in_valid <= 1;
      in_pix   <= 8'(img[i / W][i % W]);
      in_orig  <= 8'(org[i / W][i % W]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 0;
    while (n_f1 == nd) @(posedge clk);
  endtask

  task automatic write_cfg(int ch[96]);
    for (int k = 0; k < 32; k++) begin
      cfg_we <= 1; cfg_addr <= 5'(k);
      cfg_data <= '{in1: 6'(ch[3*k]), in2: 6'(ch[3*k+1]), fn: vrc_fn_e'(ch[3*k+2])};
      @(posedge clk);
      n_cfg_writes++;
    end
    cfg_we <= 0;
    @(posedge clk);
    foreach (cur[i]) cur[i] = ch[i];
  endtask

  task automatic cmp(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  // monitors
  always @(posedge clk) if (rst_n) begin
    if (!in_ready) n_stall++;
    if (out_valid && (out_row == 0 || out_col == 0 || out_row == H - 1 || out_col == W - 1)) begin
      n_border++;
      checks++;
      if (int'(out_pix) != img[out_row][out_col]) begin
        failures++; $display("FAIL border pixel (%0d,%0d)", out_row, out_col);
      end
    end
    if (out_valid && int'(out_pix) != img[out_row][out_col]) n_changed++;
    if (f1_done) begin
      n_f1++;
      if (!faulty_out) begin
        cmp("F1", int'(f1), exp_f1);
        cmp("F1 count", int'(f1_count), exp_cnt);
      end else begin
        cmp("F1 count (faulty)", int'(f1_count), exp_cnt);
        checks++;
        if (int'(f1) <= exp_f1) begin failures++; $display("FAIL faulty F1 not worse: %0d", f1); end
      end
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_cfg_writes = 0; n_stall = 0; n_border = 0; n_fault_frames = 0; n_f1 = 0; n_changed = 0;
    faulty_out = 0;
    for (int k = 0; k < 32; k++) begin cur[3*k] = 4; cur[3*k+1] = 4; cur[3*k+2] = 1; end
    for (int k = 0; k < 23; k++) ga5_cfg[k] = '{in1: 5'(c728[3*k]), in2: 5'(c728[3*k+1]), gt: gate_type_e'(c728[3*k+2])};
    for (int k = 0; k < 15; k++) ga4_cfg[k] = '{in1: 5'(c501[3*k]), in2: 5'(c501[3*k+1]), gt: gate_type_e'(c501[3*k+2])};
    ga5_in = '0; ga4_in = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // gate path
    for (int p = 0; p < 32; p++) begin
      logic c0, a0, a1, b0, b1;
      {a1, a0, b1, b0, c0} = 5'(p);
      ga5_in = {b1, b0, a1, a0, c0};
      ga4_in = {b1, b0, a1, a0};
      #1;
      cmp("full adder", int'(ga5_out), {a1, a0} + {b1, b0} + c0);
      cmp("half adder", int'(ga4_out), {a1, a0} + {b1, b0});
    end
    cmp("F2 of 728", int'(ga5_f2), 628);
    cmp("F2 of 501", int'(ga4_f2), 401);

    // image path: pass-through frame
    make_image();
    run_frame();
    cmp("pass-through CLBs used", int'(vrc_used), 1);

    // published best filter
    write_cfg(ga_best);
    #1;
    cmp("best CLBs used", int'(vrc_used), 12);
    cmp("best Cb", int'(vrc_cb), 2208);
    cmp("best Pb", int'(vrc_pb), 1331);
    cmp("best Pw", int'(vrc_pw), 449);
    cmp("best Cw", int'(vrc_cw), 715);
    cmp("best SD", int'(vrc_delay), 100);
    make_image();
    run_frame();
    $display("best filter: F1 %0d over %0d pixels", f1, f1_count);
    make_image();
    run_frame();

    // faults on CLBs the filter does not use (5 and 6): same result
    fault_we <= 1; fault_data <= 32'h0000_0060; @(posedge clk); fault_we <= 0;
    n_fault_frames++;
    make_image();
    run_frame();

    // fault on the output CLB: F1 must get worse
    fault_we <= 1; fault_data <= 32'h1000_0000; @(posedge clk); fault_we <= 0;
    n_fault_frames++;
    faulty_out = 1;
    make_image();
    run_frame();
    faulty_out = 0;

    $display("mechanisms: cfg_writes=%0d stall_cycles=%0d border=%0d fault_frames=%0d f1=%0d changed=%0d",
             n_cfg_writes, n_stall, n_border, n_fault_frames, n_f1, n_changed);
    cmp("reconfiguration seen", int'(n_cfg_writes > 0), 1);
    cmp("stall seen", int'(n_stall > 0), 1);
    cmp("border passthrough seen", int'(n_border > 0), 1);
    cmp("fault frames seen", int'(n_fault_frames > 0), 1);
    cmp("F1 results", n_f1, 5);
    cmp("filtered pixels changed", int'(n_changed > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
