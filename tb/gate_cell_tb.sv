// gate_cell_tb: the truth table of every gate type, written out by hand.
module gate_cell_tb;
  import ehw_pkg::*;

  int checks = 0, failures = 0;
  logic a, b, y;
  gate_type_e gt;

  gate_cell dut (.a(a), .b(b), .gt(gt), .y(y));

  // expected y for (a,b) = 00, 01, 10, 11 per type, types 0..9, then an undefined code
  logic [3:0] tt [11] = '{4'b1110, 4'b1000, 4'b1001, 4'b1100, 4'b1010,
                         4'b0011, 4'b0101, 4'b0001, 4'b0111, 4'b0110, 4'b0000};

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 11; t++) begin
      gt = gate_type_e'(t == 10 ? 13 : t);
      for (int p = 0; p < 4; p++) begin
        {a, b} = 2'(p);
        #1;
        checks++;
        // tt bit order: bit 3 is (a,b) = 00
        if (y != tt[t][3 - p]) begin
          failures++;
          $display("FAIL type %0d a=%0d b=%0d got %0d", t, a, b, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
