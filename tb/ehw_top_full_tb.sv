// ehw_top_full_tb: one complete operation of ehw_top at its default size,
// a 512 x 512 frame. A synthetic gray-scale image (smooth ramps plus a
// ripple) is corrupted with about 5% salt-and-pepper noise, the published
// best evolved filter is written into the VRC (its cost terms are checked
// against the published ones), and the frame is streamed through. Every output pixel is compared with a model of the filter written
// here, F1 and the interior pixel count (510 x 510) with the model's, and the
// frame time with 512*512 + 512 + 1 cycles plus the two-cycle latency. The
// mean difference per pixel before and after filtering is printed.
module ehw_top_full_tb;
  import ehw_pkg::*;

  localparam int W = 512, H = 512;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0; logic [4:0] cfg_addr = '0; vrc_gene_t cfg_data = '0;
  logic fault_we = 0; logic [31:0] fault_data = '0;
  logic in_valid = 0, in_ready; logic [7:0] in_pix = '0, in_orig = '0;
  logic out_valid, out_last; logic [7:0] out_pix;
  logic [8:0] out_row, out_col;
  logic f1_done; logic [31:0] f1; logic [19:0] f1_count;
  logic [7:0] vrc_used; logic [15:0] vrc_cb, vrc_pb, vrc_pw, vrc_cw, vrc_delay, vrc_sd_blk;
  gate_gene_t [22:0] ga5_cfg = '0; logic [4:0] ga5_in = '0; logic [2:0] ga5_out; logic [15:0] ga5_f2;
  gate_gene_t [14:0] ga4_cfg = '0; logic [3:0] ga4_in = '0; logic [2:0] ga4_out; logic [15:0] ga4_f2;

  ehw_top dut (.*);

  always #5 clk = ~clk;

  int ga_best[96] = '{4,6,1, 1,7,15, 3,8,15, 4,1,9, 12,11,9, 0,0,0, 0,0,0, 0,0,0, 0,0,0,
                      13,9,11, 0,0,0, 0,0,0, 16,19,0, 0,0,0, 0,0,0, 0,0,0, 21,13,11, 0,0,0,
                      0,0,0, 18,11,14, 10,28,14, 0,0,0, 0,0,0, 0,0,0, 25,9,14,
                      0,0,0, 0,0,0, 0,0,0, 29,33,15, 0,0,0, 0,0,0, 0,0,0};

  byte unsigned img[H][W], org[H][W], expd[H][W];
  longint exp_f1, noisy_sad;
  int nout, nbad;
  longint t_start, t_done;

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
      int a = (ga_best[3*k] < lim) ? v[ga_best[3*k]] : 0;
      int b = (ga_best[3*k+1] < lim) ? v[ga_best[3*k+1]] : 0;
      v[9 + k] = fref(ga_best[3*k+2], a, b);
    end
    return v[37];
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    int r, c;
    r = nout / W;
    c = nout % W;
    if (int'(out_row) != r || int'(out_col) != c || int'(out_pix) != int'(expd[r][c])) begin
      nbad++;
      if (nbad < 5) $display("FAIL pixel %0d: row %0d col %0d got %0d exp %0d", nout, out_row, out_col, out_pix, expd[r][c]);
    end
    nout++;
  end

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nout = 0; nbad = 0; exp_f1 = 0; noisy_sad = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int v;
        v = 40 + (r * 120) / H + (c * 80) / W + ((((r / 8) + (c / 8)) % 2) ? 10 : 0);
        org[r][c] = 8'(v);
        case ($urandom_range(0, 39))
          0: img[r][c] = 8'd0;
          1: img[r][c] = 8'd255;
          default: img[r][c] = 8'(v);
        endcase
      end
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        expd[r][c] = 8'(filt(r, c));
        if (r > 0 && c > 0 && r < H - 1 && c < W - 1) begin
          int d, e;
          d = int'(expd[r][c]) - int'(org[r][c]);
          e = int'(img[r][c]) - int'(org[r][c]);
          exp_f1 += (d < 0) ? -d : d;
          noisy_sad += (e < 0) ? -e : e;
        end
      end

    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int k = 0; k < 32; k++) begin
      cfg_we <= 1; cfg_addr <= 5'(k);
      cfg_data <= '{in1: 6'(ga_best[3*k]), in2: 6'(ga_best[3*k+1]), fn: vrc_fn_e'(ga_best[3*k+2])};
      @(posedge clk);
    end
    cfg_we <= 0;
    @(posedge clk);
    checks += 3;
    if (vrc_used != 8'd12)    begin failures++; $display("FAIL CLBs used %0d", vrc_used); end
    if (vrc_cb   != 16'd2208) begin failures++; $display("FAIL Cb %0d", vrc_cb); end
    if (vrc_pb   != 16'd1331) begin failures++; $display("FAIL Pb %0d", vrc_pb); end
    checks += 3;
    if (vrc_pw   != 16'd449)  begin failures++; $display("FAIL Pw %0d", vrc_pw); end
    if (vrc_cw   != 16'd715)  begin failures++; $display("FAIL Cw %0d", vrc_cw); end
    if (vrc_delay   != 16'd100)  begin failures++; $display("FAIL SD %0d", vrc_delay); end

    t_start = $time;
    fork
      begin
        for (int i = 0; i < W * H; i++) begin
          in_valid <= 1;
          in_pix   <= img[i / W][i % W];
          in_orig  <= org[i / W][i % W];
          @(posedge clk);
          while (!in_ready) @(posedge clk);
        end
        in_valid <= 0;
      end
    join_none
    while (!f1_done) @(posedge clk);
    t_done = $time;
    repeat (2) @(posedge clk);

    checks++;
    if (nout != W * H || nbad != 0) begin
      failures++; $display("FAIL %0d pixels out, %0d wrong", nout, nbad);
    end
    checks++;
    if (longint'(f1) != exp_f1) begin failures++; $display("FAIL F1 %0d exp %0d", f1, exp_f1); end
    checks++;
    if (int'(f1_count) != (W - 2) * (H - 2)) begin failures++; $display("FAIL count %0d", f1_count); end
    // first pixel accepted one cycle after t_start; W*H + W + 1 steps; the
    // output register and the F1 result register add one cycle each
    checks++;
    if ((t_done - t_start) / 10 != 1 + W * H + W + 1 + 2) begin
      failures++; $display("FAIL frame took %0d cycles", (t_done - t_start) / 10);
    end
    $display("frame %0d x %0d in %0d cycles; MDPP noisy %0.3f, filtered %0.3f (F1 %0d)",
             W, H, (t_done - t_start) / 10, real'(noisy_sad) / ((W - 2) * (H - 2)),
             real'(f1) / ((W - 2) * (H - 2)), f1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
