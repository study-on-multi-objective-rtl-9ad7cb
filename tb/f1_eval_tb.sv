// f1_eval_tb: random pixel pairs with random interior flags and valid gaps,
// three frames; F1 and the interior count are summed here and compared with
// the result the block reports on its done pulse.
module f1_eval_tb;
  import ehw_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic valid = 0, interior = 0, last = 0, done;
  logic [7:0] fi = 0, oi = 0;
  logic [31:0] f1;
  logic [19:0] count;

  f1_eval dut (.*);
  always #5 clk = ~clk;

  int exp_f1, exp_cnt, ndone;

  always @(posedge clk) if (rst_n && done) begin
    ndone++;
    checks += 2;
    if (int'(f1) != exp_f1)     begin failures++; $display("FAIL f1 %0d exp %0d", f1, exp_f1); end
    if (int'(count) != exp_cnt) begin failures++; $display("FAIL count %0d exp %0d", count, exp_cnt); end
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ndone = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 3; f++) begin
      int sum, cnt, n;
      sum = 0; cnt = 0; n = 100 + 37 * f;
      for (int i = 0; i < n; i++) begin
        int a, b;
        bit in_;
        while ($urandom_range(0, 4) == 0) begin valid <= 0; @(posedge clk); end
        a = (f == 2) ? 255 * (i % 2) : $urandom_range(0, 255);
        b = (f == 2) ? 255 * ((i + 1) % 2) : $urandom_range(0, 255);
        in_ = (f == 2) ? 1 : ($urandom_range(0, 3) != 0);
        valid <= 1; fi <= 8'(a); oi <= 8'(b); interior <= in_; last <= (i == n - 1);
        if (in_) begin sum += (a > b) ? a - b : b - a; cnt++; end
        @(posedge clk);
      end
      valid <= 0; last <= 0;
      exp_f1 = sum; exp_cnt = cnt;
      repeat (3) @(posedge clk);
    end
    checks++;
    if (ndone != 3) begin failures++; $display("FAIL %0d done pulses", ndone); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
