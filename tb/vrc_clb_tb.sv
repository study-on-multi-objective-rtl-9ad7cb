// vrc_clb_tb: every CLB function on random and corner operands against
// integer arithmetic worked out here, plus the faulty-block override.
module vrc_clb_tb;
  import ehw_pkg::*;

  int checks = 0, failures = 0;
  logic [7:0] x, y, fv, z;
  vrc_fn_e fn;
  logic faulty;

  vrc_clb dut (.x(x), .y(y), .fn(fn), .faulty(faulty), .fault_val(fv), .z(z));

  function automatic int ref_fn(int f, int a, int b);
    case (f)
      0:  return 255;
      1:  return a;
      2:  return 255 - a;
      3:  return a | b;
      4:  return ((255 - a) | b) & 255;
      5:  return a & b;
      6:  return 255 - (a & b);
      7:  return a ^ b;
      8:  return a / 2;
      9:  return a / 4;
      10: return ((a * 16) % 256) | (b / 16);
      11: return (a + b) % 256;
      12: return (a + b > 255) ? 255 : a + b;
      13: return (a + b) / 2;
      14: return (a > b) ? a : b;
      default: return (a < b) ? a : b;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int corner[6];
    corner = '{0, 1, 127, 128, 254, 255};
    #1;
    faulty = 0; fv = 8'h5A;
    for (int f = 0; f < 16; f++) begin
      fn = vrc_fn_e'(f);
      for (int n = 0; n < 336; n++) begin
        int a, b;
        if (n < 36) begin a = corner[n / 6]; b = corner[n % 6]; end
        else begin a = $urandom_range(0, 255); b = $urandom_range(0, 255); end
        x = 8'(a); y = 8'(b);
        #1;
        checks++;
        if (int'(z) != ref_fn(f, a, b)) begin
          failures++;
          if (failures < 10) $display("FAIL fn=%0d x=%0d y=%0d got %0d exp %0d", f, a, b, z, ref_fn(f, a, b));
        end
      end
    end
    faulty = 1;
    for (int n = 0; n < 50; n++) begin
      fn = vrc_fn_e'($urandom_range(0, 15));
      x = 8'($urandom); y = 8'($urandom); fv = 8'($urandom);
      #1;
      checks++;
      if (z != fv) begin failures++; $display("FAIL faulty: got %0d exp %0d", z, fv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
