// ehw_workload_tb: the two image workloads beyond the plain salt-and-pepper
// case, run through ehw_top at its default 512 x 512 size.
//   Frame 1: a synthetic gray-scale image in which one pixel in eight,
//            picked at random, gets additive Gaussian noise (mean 0, standard
//            deviation 65, clipped to 0..255), filtered by the best evolved
//            salt-and-pepper filter. The one-in-eight density is this
//            bench's choice; it puts the noisy MDPP near 6, the level quoted
//            for such images. Noise of this kind is only partly removed by a
//            filter evolved for impulse noise.
//   Frame 2: the same image with about 5% salt-and-pepper noise, filtered by
//            the filter evolved around two faulty CLBs, with two CLBs that the
//            filter does not use marked faulty. Their random outputs must not
//            reach the result.
// Each frame is checked pixel by pixel against a fault-free model of the
// chromosome written here, F1 and the interior count against the model's,
// and the filter must lower the mean difference per pixel (MDPP) against the
// clean image. The CLB cost terms of the two-fault filter are checked too.
// The Gaussian samples come from the Box-Muller transform of $urandom values.
module ehw_workload_tb;
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
  int fault2[96] = '{1,7,15, 3,5,13, 4,5,1, 0,0,0, 9,10,14, 11,9,2, 0,0,0, 0,0,0, 0,0,0,
                     0,0,0, 0,0,0, 0,0,0, 0,0,0, 0,0,0, 0,0,0, 13,14,12, 0,0,0, 0,0,0,
                     0,0,0, 14,9,5, 0,0,0, 0,0,0, 0,0,0, 0,0,0, 0,0,0, 0,0,0, 0,0,0,
                     11,24,15, 28,36,14, 0,0,0, 0,0,0, 0,0,0};

  int cur[96];
  byte unsigned img[H][W], org[H][W], expd[H][W];
  longint exp_f1, noisy_sad;
  int nout, nbad;
  logic checking;

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

  // One standard-normal sample.
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(0, 999998)) + 1.0) / 1000000.0;
    u2 = real'($urandom_range(0, 999999)) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic void make_image(bit gaussian);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int v, n;
        v = 40 + (r * 120) / H + (c * 80) / W + ((((r / 8) + (c / 8)) % 2) ? 10 : 0);
        org[r][c] = 8'(v);
        if (gaussian) begin
          n = v;
          if ($urandom_range(0, 7) == 0) n = v + int'($rtoi(65.0 * gauss()));
          img[r][c] = 8'((n < 0) ? 0 : (n > 255) ? 255 : n);
        end else
          case ($urandom_range(0, 39))
            0: img[r][c] = 8'd0;
            1: img[r][c] = 8'd255;
            default: img[r][c] = 8'(v);
          endcase
      end
    exp_f1 = 0; noisy_sad = 0;
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
  endfunction

  always @(posedge clk) if (rst_n && checking && out_valid) begin
    int r, c;
    r = nout / W;
    c = nout % W;
    if (int'(out_row) != r || int'(out_col) != c || int'(out_pix) != int'(expd[r][c])) begin
      nbad++;
      if (nbad < 5) $display("FAIL pixel %0d: row %0d col %0d got %0d exp %0d", nout, out_row, out_col, out_pix, expd[r][c]);
    end
    nout++;
  end

  task automatic load(string name);
    for (int k = 0; k < 32; k++) begin
      cfg_we <= 1; cfg_addr <= 5'(k);
      cfg_data <= '{in1: 6'(cur[3*k]), in2: 6'(cur[3*k+1]), fn: vrc_fn_e'(cur[3*k+2])};
      @(posedge clk);
    end
    cfg_we <= 0;
    @(posedge clk);
  endtask

  task automatic run_frame(string name);
    nout = 0; nbad = 0; checking = 1;
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
    repeat (2) @(posedge clk);
    checking = 0;
    checks++;
    if (nout != W * H || nbad != 0) begin
      failures++; $display("FAIL %s: %0d pixels out, %0d wrong", name, nout, nbad);
    end
    checks++;
    if (longint'(f1) != exp_f1) begin failures++; $display("FAIL %s: F1 %0d exp %0d", name, f1, exp_f1); end
    checks++;
    if (int'(f1_count) != (W - 2) * (H - 2)) begin failures++; $display("FAIL %s: count %0d", name, f1_count); end
    checks++;
    if (longint'(f1) >= noisy_sad) begin
      failures++; $display("FAIL %s: filter did not reduce the noise", name);
    end
    $display("%s: MDPP noisy %0.3f, filtered %0.3f, reduction ratio %0.3f", name,
             real'(noisy_sad) / ((W - 2) * (H - 2)), real'(f1) / ((W - 2) * (H - 2)),
             1.0 - real'(f1) / real'(noisy_sad));
  endtask

  initial begin
    #40ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checking = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // Frame 1: Gaussian noise, best salt-and-pepper filter, no faults.
    foreach (ga_best[i]) cur[i] = ga_best[i];
    make_image(1'b1);
    load("gaussian");
    run_frame("gaussian sigma 65");

    // Frame 2: salt-and-pepper noise, two-fault filter, CLB12 and CLB29
    // (indices 3 and 20) faulty; neither is on a path to the output.
    foreach (fault2[i]) cur[i] = fault2[i];
    make_image(1'b0);
    load("two faults");
    fault_we <= 1; fault_data <= (32'd1 << 3) | (32'd1 << 20);
    @(posedge clk);
    fault_we <= 0;
    @(posedge clk);
    checks += 3;
    if (vrc_used != 8'd9)     begin failures++; $display("FAIL CLBs used %0d", vrc_used); end
    if (vrc_cb   != 16'd1749) begin failures++; $display("FAIL Cb %0d", vrc_cb); end
    if (vrc_pb   != 16'd1055) begin failures++; $display("FAIL Pb %0d", vrc_pb); end
    checks += 3;
    if (vrc_pw   != 16'd449)  begin failures++; $display("FAIL Pw %0d", vrc_pw); end
    if (vrc_cw   != 16'd713)  begin failures++; $display("FAIL Cw %0d", vrc_cw); end
    if (vrc_delay   != 16'd112)  begin failures++; $display("FAIL SD %0d", vrc_delay); end
    run_frame("salt-and-pepper, two faulty CLBs");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
