// vrc_array_tb: the 8 x 4 VRC and the 4 x 4 variant against a behavioural
// model of the chromosome encoding written here, with the three published
// filter chromosomes (genetic-algorithm best, best under two faults, particle
// swarm best) and random chromosomes on random windows; hand-worked windows
// for the published best filter; and faulty CLBs.
module vrc_array_tb;
  import ehw_pkg::*;

  int checks = 0, failures = 0;

  logic [8:0][7:0]  pix;
  vrc_gene_t [31:0] cfg8;
  vrc_gene_t [15:0] cfg4;
  logic [31:0]      fm8;
  logic [15:0]      fm4;
  logic [31:0]      rnd;
  logic [7:0]       out8, out4;

  vrc_array dut8 (.pix(pix), .cfg(cfg8), .fault_mask(fm8), .rnd(rnd), .out(out8));
  vrc_array #(.COLS(4), .ROWS(4)) dut4 (.pix(pix), .cfg(cfg4), .fault_mask(fm4), .rnd(rnd), .out(out4));

  int ga_best[96] = '{4,6,1, 1,7,15, 3,8,15, 4,1,9, 12,11,9, 0,0,0, 0,0,0, 0,0,0, 0,0,0,
                      13,9,11, 0,0,0, 0,0,0, 16,19,0, 0,0,0, 0,0,0, 0,0,0, 21,13,11, 0,0,0,
                      0,0,0, 18,11,14, 10,28,14, 0,0,0, 0,0,0, 0,0,0, 25,9,14,
                      0,0,0, 0,0,0, 0,0,0, 29,33,15, 0,0,0, 0,0,0, 0,0,0};
  int fault2[96] = '{1,7,15, 3,5,13, 4,5,1, 0,0,0, 9,10,14, 11,9,2, 0,0,0, 0,0,0, 0,0,0,
                     0,0,0, 0,0,0, 0,0,0, 0,0,0, 0,0,0, 0,0,0, 13,14,12, 0,0,0, 0,0,0,
                     0,0,0, 14,9,5, 0,0,0, 0,0,0, 0,0,0, 0,0,0, 0,0,0, 0,0,0, 0,0,0,
                     11,24,15, 28,36,14, 0,0,0, 0,0,0, 0,0,0};
  int pso[48] = '{0,0,0, 1,7,15, 3,5,14, 8,5,15, 0,0,0, 0,0,0, 0,0,0, 11,12,14,
                  0,0,0, 0,0,0, 0,0,0, 4,16,15, 10,20,14, 0,0,0, 0,0,0, 0,0,0};

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

  // Model: ch holds rows*cols triplets; output = first CLB of last column.
  function automatic int model(int ch[], int cols, int rows, logic [8:0][7:0] p,
                               logic [31:0] fmask, logic [31:0] r);
    int v[64];
    for (int i = 0; i < 9; i++) v[i] = p[i];
    for (int k = 0; k < cols * rows; k++) begin
      int lim = 9 + (k / rows) * rows;
      int a = (ch[3*k]   < lim) ? v[ch[3*k]]   : 0;
      int b = (ch[3*k+1] < lim) ? v[ch[3*k+1]] : 0;
      logic [63:0] rr = {r, r} >> (k % 32);
      v[9 + k] = fmask[k] ? int'(rr[7:0]) : fref(ch[3*k+2], a, b);
    end
    return v[9 + (cols - 1) * rows];
  endfunction

  task automatic load8(int ch[]);
    for (int k = 0; k < 32; k++) begin
      cfg8[k].in1 = 6'(ch[3*k]); cfg8[k].in2 = 6'(ch[3*k+1]); cfg8[k].fn = vrc_fn_e'(ch[3*k+2]);
    end
  endtask
  task automatic load4(int ch[]);
    for (int k = 0; k < 16; k++) begin
      cfg4[k].in1 = 6'(ch[3*k]); cfg4[k].in2 = 6'(ch[3*k+1]); cfg4[k].fn = vrc_fn_e'(ch[3*k+2]);
    end
  endtask

  task automatic rand_pix();
    for (int i = 0; i < 9; i++)
      case ($urandom_range(0, 9))
        0: pix[i] = 8'd0;      // pepper
        1: pix[i] = 8'd255;    // salt
        default: pix[i] = 8'($urandom_range(60, 200));
      endcase
  endtask

  task automatic cmp(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ch8[] = new[96];
    int ch4[] = new[48];
    fm8 = '0; fm4 = '0; rnd = 32'h1234_5678;

    // Hand-worked: flat window of 100 gives 100 through the published best
    // filter (max/min of equal values, x>>2 paths are not on the max/min
    // winning side): traced by hand below.
    load8(ga_best);
    for (int i = 0; i < 9; i++) pix[i] = 8'd100;
    #1;
    // CLB11=min(3,8)=100, CLB12=25, CLB13=6, CLB18=6+100=106, CLB28=max(106,100)=106,
    // CLB10=100, CLB29=max(100,106)=106, CLB21=255, CLB25=255+6=5 (mod 256),
    // CLB9=100, CLB33=max(5,100)=100, CLB37=min(106,100)=100
    cmp("best filter, flat 100", int'(out8), 100);
    // Salt in the centre of a flat 100 window: traced the same way gives 100.
    pix[4] = 8'd255;
    #1;
    cmp("best filter, salt centre", int'(out8), 100);

    foreach (ga_best[i]) ch8[i] = ga_best[i];
    for (int n = 0; n < 500; n++) begin
      rand_pix(); load8(ch8); #1;
      cmp("ga_best", int'(out8), model(ch8, 8, 4, pix, '0, rnd));
    end
    foreach (fault2[i]) ch8[i] = fault2[i];
    for (int n = 0; n < 500; n++) begin
      rand_pix(); load8(ch8); #1;
      cmp("fault2", int'(out8), model(ch8, 8, 4, pix, '0, rnd));
    end
    foreach (pso[i]) ch4[i] = pso[i];
    for (int n = 0; n < 500; n++) begin
      rand_pix(); load4(ch4); #1;
      cmp("pso 4x4", int'(out4), model(ch4, 4, 4, pix, '0, rnd));
    end

    // Random chromosomes, selectors anywhere in 0..63, random faults.
    for (int n = 0; n < 3000; n++) begin
      for (int k = 0; k < 32; k++) begin
        ch8[3*k]   = $urandom_range(0, (n % 4 == 0) ? 63 : 8 + (k / 4) * 4);
        ch8[3*k+1] = $urandom_range(0, (n % 4 == 0) ? 63 : 8 + (k / 4) * 4);
        ch8[3*k+2] = $urandom_range(0, 15);
      end
      for (int k = 0; k < 16; k++) begin
        ch4[3*k]   = $urandom_range(0, 8 + (k / 4) * 4);
        ch4[3*k+1] = $urandom_range(0, 8 + (k / 4) * 4);
        ch4[3*k+2] = $urandom_range(0, 15);
      end
      rand_pix(); load8(ch8); load4(ch4);
      rnd = $urandom;
      fm8 = (n % 3 == 0) ? ($urandom & $urandom & $urandom) : '0;
      fm4 = '0;
      #1;
      cmp("random 8x4", int'(out8), model(ch8, 8, 4, pix, fm8, rnd));
      cmp("random 4x4", int'(out4), model(ch4, 4, 4, pix, 32'(fm4), rnd));
    end

    // Faulty output CLB (index 28): output is byte of rnd rotated by 28.
    load8(ga_best);
    fm8 = 32'h1000_0000;
    rnd = 32'hA5C3_0F96;
    #1;
    cmp("faulty output CLB", int'(out8), 8'h6A);   // A5C30F96A5C30F96 >> 28 -> low byte 0x6A
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
