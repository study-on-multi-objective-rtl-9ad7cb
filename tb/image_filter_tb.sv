// image_filter_tb: streams small frames (IMG_W x IMG_H reduced to 10 x 7)
// through the filter and checks every output pixel, its row, column,
// interior and last flags and the side byte against a frame-level model
// written here. Frames: pass-through after reset; the published best filter
// loaded through the configuration port, with input gaps; the same frame
// again back to back; a fault on a CLB the filter does not use (no effect);
// a fault on the output CLB (interior pixels must change). Also checks the
// frame period of IMG_W*IMG_H + IMG_W + 1 cycles with no input gaps.
module image_filter_tb;
  import ehw_pkg::*;

  localparam int W = 10, H = 7;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0; logic [4:0] cfg_addr = '0; vrc_gene_t cfg_data = '0;
  logic fault_we = 0; logic [31:0] fault_data = '0;
  logic in_valid = 0, in_ready; logic [7:0] in_pix = '0, in_aux = '0;
  logic out_valid, out_interior, out_last; logic [7:0] out_pix, out_aux;
  logic [2:0] out_row; logic [3:0] out_col;
  vrc_gene_t [31:0] cfg_cur;

  image_filter #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  int ga_best[96] = '{4,6,1, 1,7,15, 3,8,15, 4,1,9, 12,11,9, 0,0,0, 0,0,0, 0,0,0, 0,0,0,
                      13,9,11, 0,0,0, 0,0,0, 16,19,0, 0,0,0, 0,0,0, 0,0,0, 21,13,11, 0,0,0,
                      0,0,0, 18,11,14, 10,28,14, 0,0,0, 0,0,0, 0,0,0, 25,9,14,
                      0,0,0, 0,0,0, 0,0,0, 29,33,15, 0,0,0, 0,0,0, 0,0,0};
  int cur[96];          // configuration the model uses
  int img[H][W], org[H][W];
  int nout, ndiff;
  bit check_values;     // off for the faulty-output frame
  bit gaps;
  longint t_first, t_last;
  longint last_times[$];

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

  function automatic int vrc_model(int r, int c);
    int v[41];
    for (int i = 0; i < 9; i++) v[i] = img[r - 1 + i / 3][c - 1 + i % 3];
    for (int k = 0; k < 32; k++) begin
      int lim = 9 + (k / 4) * 4;
      int a = (cur[3*k] < lim) ? v[cur[3*k]] : 0;
      int b = (cur[3*k+1] < lim) ? v[cur[3*k+1]] : 0;
      v[9 + k] = fref(cur[3*k+2], a, b);
    end
    return v[9 + 28];
  endfunction

  function automatic int expect_pix(int r, int c);
    if (r == 0 || c == 0 || r == H - 1 || c == W - 1) return img[r][c];
    return vrc_model(r, c);
  endfunction

  // output checker
  always @(posedge clk) if (rst_n && out_valid) begin
    int r, c;
    bit inter;
    r = nout / W;
    c = nout % W;
    inter = !(r == 0 || c == 0 || r == H - 1 || c == W - 1);
    checks++;
    if (int'(out_row) != r || int'(out_col) != c || out_interior != inter ||
        out_last != (nout == W*H - 1) || int'(out_aux) != org[r][c]) begin
      failures++;
      if (failures < 10) $display("FAIL tag at %0d: row %0d col %0d int %0d last %0d aux %0d",
                                  nout, out_row, out_col, out_interior, out_last, out_aux);
    end
    if (check_values) begin
      checks++;
      if (int'(out_pix) != expect_pix(r, c)) begin
        failures++;
        if (failures < 10) $display("FAIL pixel (%0d,%0d): got %0d exp %0d", r, c, out_pix, expect_pix(r, c));
      end
    end else if (inter && int'(out_pix) != vrc_model(r, c)) ndiff++;
    if (nout == 0) t_first = $time;
    if (out_last) begin t_last = $time; last_times.push_back($time); end
    nout = (nout + 1) % (W * H);
  end

  task automatic make_image();
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        org[r][c] = $urandom_range(40, 220);
        case ($urandom_range(0, 19))
          0: img[r][c] = 0;
          1: img[r][c] = 255;
          default: img[r][c] = org[r][c];
        endcase
      end
  endtask

  task automatic send_frame();
    for (int i = 0; i < W * H; i++) begin
      if (gaps) while ($urandom_range(0, 3) == 0) begin
        in_valid <= 0; @(posedge clk);
      end
      in_valid <= 1;
      in_pix   <= 8'(img[i / W][i % W]);
      in_aux   <= 8'(org[i / W][i % W]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 0;
  endtask

  task automatic wait_frame_out();
    int guard = 0;
    while (nout != 0 || !(out_valid && out_last)) begin
      @(posedge clk);
      if (++guard > 10 * W * H) break;
    end
    @(posedge clk);
  endtask

  task automatic write_cfg(int ch[96]);
    for (int k = 0; k < 32; k++) begin
      cfg_we   <= 1;
      cfg_addr <= 5'(k);
      cfg_data <= '{in1: 6'(ch[3*k]), in2: 6'(ch[3*k+1]), fn: vrc_fn_e'(ch[3*k+2])};
      @(posedge clk);
    end
    cfg_we <= 0;
    @(posedge clk);
    foreach (cur[i]) cur[i] = ch[i];
    for (int k = 0; k < 32; k++) begin
      checks++;
      if (cfg_cur[k] != {6'(ch[3*k]), 6'(ch[3*k+1]), 4'(ch[3*k+2])}) begin
        failures++; $display("FAIL cfg readback %0d", k);
      end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nout = 0; check_values = 1; gaps = 0;
    for (int k = 0; k < 32; k++) begin cur[3*k] = 4; cur[3*k+1] = 4; cur[3*k+2] = 1; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // 1: reset configuration passes the frame through; no gaps -> frame period
    make_image();
    fork send_frame(); join_none
    wait_frame_out();
    checks++;
    if (t_last - t_first != longint'(W * H - 1) * 10) begin
      failures++; $display("FAIL output span %0d", t_last - t_first);
    end

    // 2: published best filter, input gaps
    write_cfg(ga_best);
    make_image();
    gaps = 1;
    fork send_frame(); join_none
    wait_frame_out();

    // 3: two frames back to back without gaps: period W*H + W + 1
    gaps = 0;
    last_times.delete();
    fork begin send_frame(); send_frame(); end join_none
    wait (last_times.size() == 2);
    repeat (2) @(posedge clk);
    checks++;
    if (last_times[1] - last_times[0] != longint'(W * H + W + 1) * 10) begin
      failures++; $display("FAIL frame period %0d cycles", (last_times[1] - last_times[0]) / 10);
    end

    // 4: fault on a CLB the filter does not use (CLB 5): output unchanged
    fault_we <= 1; fault_data <= 32'h0000_0020; @(posedge clk); fault_we <= 0;
    make_image();
    fork send_frame(); join_none
    wait_frame_out();

    // 5: fault on the output CLB (28): interior pixels take random values
    fault_we <= 1; fault_data <= 32'h1000_0000; @(posedge clk); fault_we <= 0;
    check_values = 0; ndiff = 0;
    make_image();
    fork send_frame(); join_none
    wait_frame_out();
    checks++;
    if (ndiff < (W - 2) * (H - 2) / 2) begin
      failures++; $display("FAIL faulty output CLB changed only %0d pixels", ndiff);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
