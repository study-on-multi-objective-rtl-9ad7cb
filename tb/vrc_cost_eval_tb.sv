// vrc_cost_eval_tb: cost terms of the published best filter (12 CLBs used,
// Cb 2208, Pb 1331, Pw 449, Cw 715, SD 100, as published) and of the filter
// evolved around two faults (Pw 449, Cw 713, SD 112, as published), plus
// hand-worked small cases, including the block-only critical path, and the
// divide-by-five helper over its full range. Wire lengths in the comments
// are Manhattan distances on the pin grid.
module vrc_cost_eval_tb;
  import ehw_pkg::*;

  int checks = 0, failures = 0;
  vrc_gene_t [31:0] cfg;
  logic [31:0] used;
  logic [7:0]  n_used;
  logic [15:0] cb, pb, sd, pw, cw, sdw;

  vrc_cost_eval dut (.cfg(cfg), .used(used), .n_used(n_used), .cb(cb), .pb(pb),
                     .pw(pw), .cw(cw), .sd(sdw), .sd_blk(sd));

  int ga_best[96] = '{4,6,1, 1,7,15, 3,8,15, 4,1,9, 12,11,9, 0,0,0, 0,0,0, 0,0,0, 0,0,0,
                      13,9,11, 0,0,0, 0,0,0, 16,19,0, 0,0,0, 0,0,0, 0,0,0, 21,13,11, 0,0,0,
                      0,0,0, 18,11,14, 10,28,14, 0,0,0, 0,0,0, 0,0,0, 25,9,14,
                      0,0,0, 0,0,0, 0,0,0, 29,33,15, 0,0,0, 0,0,0, 0,0,0};
  // Best filter evolved with two faulty CLBs.
  int fault2[96] = '{1,7,15, 3,5,13, 4,5,1, 0,0,0, 9,10,14, 11,9,2, 0,0,0, 0,0,0, 0,0,0,
                     0,0,0, 0,0,0, 0,0,0, 0,0,0, 0,0,0, 0,0,0, 13,14,12, 0,0,0, 0,0,0,
                     0,0,0, 14,9,5, 0,0,0, 0,0,0, 0,0,0, 0,0,0, 0,0,0, 0,0,0, 0,0,0,
                     11,24,15, 28,36,14, 0,0,0, 0,0,0, 0,0,0};

  task automatic cmp(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 32; k++) begin
      cfg[k].in1 = 6'(ga_best[3*k]); cfg[k].in2 = 6'(ga_best[3*k+1]);
      cfg[k].fn  = vrc_fn_e'(ga_best[3*k+2]);
    end
    #1;
    cmp("best n_used", int'(n_used), 12);
    cmp("best Cb", int'(cb), 2208);
    cmp("best Pb", int'(pb), 1331);
    // slowest path: CLB11 min(16) -> CLB28 max(16) -> CLB29 max(16) -> CLB37 min(16)
    // vs CLB12 >>2 (2) -> CLB13 >>2 (2) -> CLB18 add(18) -> CLB28 -> CLB29 -> CLB37:
    // 2+2+18+16+16+16 = 70; CLB11 path 16+16+16+16 = 64; CLB25 path:
    // CLB21 const(1) -> CLB25 add(18) -> CLB33 max(16) -> CLB37: 1+18+16+16 = 51,
    // CLB13 -> CLB25: 4+18+16+16 = 54. Critical = 70.
    cmp("best sd_blk", int'(sd), 70);
    // published wire power, wire complexity and delay of this filter
    cmp("best Pw", int'(pw), 449);
    cmp("best Cw", int'(cw), 715);
    cmp("best SD", int'(sdw), 100);
    cmp("best used mask", int'(used), (1<<0)|(1<<1)|(1<<2)|(1<<3)|(1<<4)|(1<<9)|(1<<12)|
                                      (1<<16)|(1<<19)|(1<<20)|(1<<24)|(1<<28));

    // Two-fault filter, worked by hand: min, avg, identity, max, inv, adds,
    // and, min, max on nine CLBs; Cb 1749, Pb 1055.
    for (int k = 0; k < 32; k++) begin
      cfg[k].in1 = 6'(fault2[3*k]); cfg[k].in2 = 6'(fault2[3*k+1]);
      cfg[k].fn  = vrc_fn_e'(fault2[3*k+2]);
    end
    #1;
    cmp("fault2 n_used", int'(n_used), 9);
    cmp("fault2 Cb", int'(cb), 1749);
    cmp("fault2 Pb", int'(pb), 1055);
    cmp("fault2 Pw", int'(pw), 449);
    cmp("fault2 Cw", int'(cw), 713);
    cmp("fault2 SD", int'(sdw), 112);

    // Pass-through: every CLB is (4,4,identity); only the output CLB counts.
    for (int k = 0; k < 32; k++) begin
      cfg[k].in1 = 6'd4; cfg[k].in2 = 6'd4; cfg[k].fn = FN_IDENT;
    end
    #1;
    cmp("ident n_used", int'(n_used), 1);
    cmp("ident Cb", int'(cb), 16);
    cmp("ident Pb", int'(pb), 10);
    cmp("ident sd", int'(sd), 2);
    // one wire, I4 (0,16) to the in1 pin of CLB37 (72,36): L = 92
    cmp("ident Pw", int'(pw), 92);
    cmp("ident Cw", int'(cw), 147);
    cmp("ident SD", int'(sdw), 2 + 19);

    // Chain through all eight columns on row 0: CLB 4c reads CLB 4(c-1).
    for (int c = 1; c < 8; c++) begin
      cfg[4*c].in1 = 6'(9 + 4*(c-1)); cfg[4*c].in2 = 6'd0; cfg[4*c].fn = FN_ADDS;
    end
    cfg[0].fn = FN_XOR;
    #1;
    cmp("chain n_used", int'(n_used), 8);
    cmp("chain Cb", int'(cb), 64 + 7*367);
    cmp("chain Pb", int'(pb), 38 + 7*220);
    cmp("chain sd", int'(sd), 4 + 7*19);
    cmp("chain Pw", int'(pw), 385);
    cmp("chain Cw", int'(cw), 613);
    cmp("chain SD", int'(sdw), 149);
    // A selector pointing at the same column is not a connection.
    cfg[28].in1 = 6'(9 + 29);
    #1;
    cmp("same-column n_used", int'(n_used), 1);
    // only the wire from I0 (0,36) to in2 (72,34) remains: L = 74
    cmp("same-column Pw", int'(pw), 74);
    cmp("same-column Cw", int'(cw), 118);
    cmp("same-column SD", int'(sdw), 19 + 15);
    // the divide-by-five helper over its whole range
    for (int x = 0; x < 1024; x++) begin
      checks++;
      if (int'(div5(10'(x))) != x / 5) begin
        failures++;
        $display("FAIL div5(%0d) = %0d", x, div5(10'(x)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
