// gate_array_tb: checks the gate-level array in both published shapes.
//  * 5 x 5, five inputs (c0,a0,a1,b0,b1), three outputs (s0,s1,c1): the five
//    evolved 2-bit full adder chromosomes (fitness 670, 692, 716, 722, 728)
//    must give {c1,s1,s0} = {a1,a0} + {b1,b0} + c0 for all 32 patterns.
//  * 4 x 4, four inputs (a0,a1,b0,b1): the evolved 2-bit half adder
//    chromosome (fitness 501) must give {c,s1,s0} = {a1,a0} + {b1,b0}.
//  * Random chromosomes on the 5 x 5 array against a behavioural model of
//    the encoding written here.
module gate_array_tb;
  import ehw_pkg::*;

  int checks = 0, failures = 0;

  localparam int NG5 = 23, NG4 = 15;
  gate_gene_t [NG5-1:0] cfg5;
  gate_gene_t [NG4-1:0] cfg4;
  logic [4:0] in5;  logic [2:0] out5;
  logic [3:0] in4;  logic [2:0] out4;

  gate_array dut5 (.in(in5), .cfg(cfg5), .out(out5));
  gate_array #(.COLS(4), .ROWS(4), .NIN(4), .NOUT(3)) dut4 (.in(in4), .cfg(cfg4), .out(out4));

  // Published chromosomes, flattened triplets.
  int c670[69] = '{0,3,2, 2,4,2, 2,4,0, 0,1,9, 1,0,3, 3,1,8, 0,1,7, 1,4,1, 2,0,8, 0,3,0,
                   2,7,2, 4,6,7, 3,0,6, 1,4,9, 1,9,1, 0,3,6, 9,1,1, 0,0,9, 1,4,8, 9,4,6,
                   0,4,9, 9,13,2, 10,14,9};
  int c692[69] = '{2,4,1, 2,4,2, 0,1,9, 0,1,0, 0,3,6, 2,4,0, 3,1,1, 0,4,6, 3,1,8, 1,0,2,
                   3,5,7, 4,0,3, 1,7,3, 7,8,3, 3,9,6, 10,12,0, 0,10,4, 12,7,7, 12,4,8, 3,13,3,
                   2,4,9, 1,10,9, 0,15,9};
  int c716[69] = '{0,1,0, 0,3,6, 2,4,2, 2,4,0, 0,1,9, 1,4,0, 2,4,6, 1,0,7, 2,0,4, 0,4,7,
                   0,4,3, 6,5,8, 8,7,6, 4,1,4, 0,5,2, 2,14,1, 13,8,2, 2,13,5, 0,3,0, 3,13,2,
                   1,4,9, 2,14,9, 3,15,2};
  int c722[69] = '{2,4,0, 2,4,2, 0,0,3, 1,3,7, 1,3,2, 1,4,5, 4,2,5, 1,2,6, 2,0,6, 2,4,1,
                   5,9,5, 9,4,8, 4,2,4, 0,1,4, 3,9,1, 7,14,4, 10,11,0, 11,8,4, 8,3,1, 1,14,1,
                   2,4,9, 1,14,9, 0,19,2};
  int c728[69] = '{2,4,9, 2,4,0, 0,1,9, 0,1,0, 3,3,5, 1,0,0, 3,0,2, 3,1,2, 3,2,8, 2,4,0,
                   5,3,4, 9,3,0, 8,9,6, 0,8,9, 3,6,9, 8,7,2, 12,0,0, 9,10,7, 0,11,0, 12,1,2,
                   2,4,9, 0,11,9, 1,18,0};
  int c501[45] = '{0,2,2, 0,2,7, 1,3,1, 1,3,2, 3,2,5, 0,0,5, 3,0,5, 1,3,1, 1,6,9, 4,2,6,
                   3,6,1, 5,7,4, 0,6,3, 1,3,2, 2,7,1};

  function automatic bit gate_ref(int t, bit a, bit b);
    case (t)
      0: return !(a && b);  1: return !(a || b);  2: return a == b;
      3: return !a;         4: return !b;         5: return a;
      6: return b;          7: return a && b;     8: return a || b;
      9: return a != b;     default: return 0;
    endcase
  endfunction

  // Behavioural model of the 5 x 5 array: evaluate gates in order.
  function automatic logic [2:0] model5(int ch[69], logic [4:0] x);
    bit g[25];
    logic [2:0] o;
    for (int k = 0; k < 23; k++) begin
      int i1 = ch[3*k], i2 = ch[3*k+1], t = ch[3*k+2];
      int lim = (k < 5) ? 5 : (k / 5) * 5;
      bit a, b;
      if (k < 5) begin a = (i1 < lim) ? x[i1] : 0; b = (i2 < lim) ? x[i2] : 0; end
      else       begin a = (i1 < lim) ? g[i1] : 0; b = (i2 < lim) ? g[i2] : 0; end
      g[k] = gate_ref(t, a, b);
    end
    o = {g[22], g[21], g[20]};
    return o;
  endfunction

  task automatic load5(int ch[69]);
    for (int k = 0; k < NG5; k++) begin
      cfg5[k].in1 = 5'(ch[3*k]); cfg5[k].in2 = 5'(ch[3*k+1]); cfg5[k].gt = gate_type_e'(ch[3*k+2]);
    end
  endtask

  task automatic check_full_adder(int ch[69], string name);
    int bad = 0;
    load5(ch);
    for (int p = 0; p < 32; p++) begin
      logic c0, a0, a1, b0, b1; logic [2:0] exp;
      {a1, a0, b1, b0, c0} = 5'(p);
      in5 = {b1, b0, a1, a0, c0};
      #1;
      exp = 3'({a1, a0} + {b1, b0} + c0);
      checks++;
      if (out5 !== exp) begin
        bad++; failures++;
        if (bad <= 3) $display("FAIL %s a=%0d b=%0d c0=%0d: got %b exp %b", name, {a1,a0}, {b1,b0}, c0, out5, exp);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_full_adder(c670, "fit670");
    check_full_adder(c692, "fit692");
    check_full_adder(c716, "fit716");
    check_full_adder(c722, "fit722");
    check_full_adder(c728, "fit728");

    // 4 x 4 half adder
    for (int k = 0; k < NG4; k++) begin
      cfg4[k].in1 = 5'(c501[3*k]); cfg4[k].in2 = 5'(c501[3*k+1]); cfg4[k].gt = gate_type_e'(c501[3*k+2]);
    end
    for (int p = 0; p < 16; p++) begin
      logic a0, a1, b0, b1; logic [2:0] exp;
      {a1, a0, b1, b0} = 4'(p);
      in4 = {b1, b0, a1, a0};
      #1;
      exp = 3'({a1, a0} + {b1, b0});
      checks++;
      if (out4 !== exp) begin
        failures++;
        $display("FAIL fit501 a=%0d b=%0d: got %b exp %b", {a1,a0}, {b1,b0}, out4, exp);
      end
    end

    // Random chromosomes, including out-of-range selectors and types.
    for (int n = 0; n < 200; n++) begin
      int ch[69];
      for (int k = 0; k < 23; k++) begin
        ch[3*k]   = $urandom_range(0, 24);
        ch[3*k+1] = $urandom_range(0, 24);
        ch[3*k+2] = $urandom_range(0, 11);
      end
      load5(ch);
      for (int p = 0; p < 32; p++) begin
        in5 = 5'(p);
        #1;
        checks++;
        if (out5 !== model5(ch, 5'(p))) begin
          failures++;
          if (failures < 5) $display("FAIL random n=%0d p=%0d got %b exp %b", n, p, out5, model5(ch, 5'(p)));
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
