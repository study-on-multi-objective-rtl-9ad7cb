// gate_cost_eval_tb: the five evolved 2-bit full adder chromosomes must give
// the published F2 accounts (EC sum, EP sum, ESD sum, F2) of 570, 592, 616,
// 622 and 628, and the 4 x 4 instance is checked on a hand-worked case.
module gate_cost_eval_tb;
  import ehw_pkg::*;

  int checks = 0, failures = 0;
  gate_gene_t [22:0] cfg;
  logic [22:0] used;
  logic [15:0] ec, ep, esd, f2;
  gate_gene_t [14:0] cfg4;
  logic [14:0] used4;
  logic [15:0] ec4, ep4, esd4, f24;

  gate_cost_eval dut (.cfg(cfg), .used(used), .ec_sum(ec), .ep_sum(ep), .esd_sum(esd), .f2(f2));
  gate_cost_eval #(.COLS(4), .ROWS(4), .NOUT(3)) dut4
    (.cfg(cfg4), .used(used4), .ec_sum(ec4), .ep_sum(ep4), .esd_sum(esd4), .f2(f24));

  int chr[5][69] = '{
    '{0,3,2, 2,4,2, 2,4,0, 0,1,9, 1,0,3, 3,1,8, 0,1,7, 1,4,1, 2,0,8, 0,3,0,
      2,7,2, 4,6,7, 3,0,6, 1,4,9, 1,9,1, 0,3,6, 9,1,1, 0,0,9, 1,4,8, 9,4,6,
      0,4,9, 9,13,2, 10,14,9},
    '{2,4,1, 2,4,2, 0,1,9, 0,1,0, 0,3,6, 2,4,0, 3,1,1, 0,4,6, 3,1,8, 1,0,2,
      3,5,7, 4,0,3, 1,7,3, 7,8,3, 3,9,6, 10,12,0, 0,10,4, 12,7,7, 12,4,8, 3,13,3,
      2,4,9, 1,10,9, 0,15,9},
    '{0,1,0, 0,3,6, 2,4,2, 2,4,0, 0,1,9, 1,4,0, 2,4,6, 1,0,7, 2,0,4, 0,4,7,
      0,4,3, 6,5,8, 8,7,6, 4,1,4, 0,5,2, 2,14,1, 13,8,2, 2,13,5, 0,3,0, 3,13,2,
      1,4,9, 2,14,9, 3,15,2},
    '{2,4,0, 2,4,2, 0,0,3, 1,3,7, 1,3,2, 1,4,5, 4,2,5, 1,2,6, 2,0,6, 2,4,1,
      5,9,5, 9,4,8, 4,2,4, 0,1,4, 3,9,1, 7,14,4, 10,11,0, 11,8,4, 8,3,1, 1,14,1,
      2,4,9, 1,14,9, 0,19,2},
    '{2,4,9, 2,4,0, 0,1,9, 0,1,0, 3,3,5, 1,0,0, 3,0,2, 3,1,2, 3,2,8, 2,4,0,
      5,3,4, 9,3,0, 8,9,6, 0,8,9, 3,6,9, 8,7,2, 12,0,0, 9,10,7, 0,11,0, 12,1,2,
      2,4,9, 0,11,9, 1,18,0}};
  // Published accounts: EC = 20+72+50+100+6 etc., summed over columns.
  int exp_ec[5]  = '{20+72+50+100+6, 26+86+72+86+6, 26+86+82+86+6, 22+86+86+86+6, 26+86+86+86+10};
  int exp_ep[5]  = '{33+74+59+100+18, 30+87+73+87+18, 30+87+86+87+18, 32+87+87+87+18, 30+87+87+87+19};
  int exp_esd[5] = '{4+6+4+20+4, 2+6+3+6+4, 2+6+4+6+4, 3+6+6+6+4, 2+6+6+6+4};
  int exp_f2[5]  = '{570, 592, 616, 622, 628};

  task automatic chk(string what, int got, int exp);
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
    for (int n = 0; n < 5; n++) begin
      for (int k = 0; k < 23; k++) begin
        cfg[k].in1 = 5'(chr[n][3*k]); cfg[k].in2 = 5'(chr[n][3*k+1]);
        cfg[k].gt  = gate_type_e'(chr[n][3*k+2]);
      end
      #1;
      chk($sformatf("chrom %0d EC", n),  int'(ec),  exp_ec[n]);
      chk($sformatf("chrom %0d EP", n),  int'(ep),  exp_ep[n]);
      chk($sformatf("chrom %0d ESD", n), int'(esd), exp_esd[n]);
      chk($sformatf("chrom %0d F2", n),  int'(f2),  exp_f2[n]);
    end
    // 4 x 4: outputs are three WIRE(in1) gates reading G0, which is an XOR
    // of inputs; everything else unused.
    // EC: col0 = 2 + 3*20, cols 1,2 = 80 each, col3 = 3*10 -> 62+160+30 = 252
    // EP: col0 = 6 + 60, cols 1,2 = 80 each, col3 = 3*4 -> 66+160+12 = 238
    // ESD: col0 min 4, cols 1,2 = 20, col3 = 2 -> 46;  F2 = 536
    for (int k = 0; k < 15; k++) begin
      cfg4[k].in1 = 5'd0; cfg4[k].in2 = 5'd1; cfg4[k].gt = GT_WIRE1;
    end
    cfg4[0].gt = GT_XOR;
    cfg4[4].gt = GT_WIRE1; cfg4[4].in1 = 5'd0;   // column 1 gate reading G0
    cfg4[12].in1 = 5'd4; cfg4[13].in1 = 5'd4; cfg4[14].in1 = 5'd4;
    cfg4[8].in1 = 5'd4;                          // column 2 gate, unused
    #1;
    // used: G0, G4, G12..G14
    // col1 now has G4 used (WIRE: EC 10, EP 4, ESD 2): EC col1 = 10+60 = 70
    chk("4x4 EC",  int'(ec4),  62 + 70 + 80 + 30);
    chk("4x4 EP",  int'(ep4),  66 + 64 + 80 + 12);
    chk("4x4 ESD", int'(esd4), 4 + 2 + 20 + 2);
    chk("4x4 F2",  int'(f24),  242 + 222 + 28);
    chk("4x4 used", int'(used4), (1 << 0) | (1 << 4) | (7 << 12));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
