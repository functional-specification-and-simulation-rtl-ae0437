// tb_fpu_expbox -- random exponents through the difference section (greater operand, 7-bit
// difference, 128-or-more flag) and random operands through the result section (add or
// subtract with carry, range flags), compared with integer arithmetic.
module tb_fpu_expbox;
  logic [16:0] ea, eb;
  logic b_gt_a, ge128, sub, cin, ovf, unf;
  logic [6:0] shamt;
  logic [17:0] left, right, result;
  logic signed [17:0] emax, emin;
  int checks = 0, failures = 0;

  fpu_expbox dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int a, b, d, l, r, res;
      a = int'($urandom() % 131072) - 65536;
      b = (n % 2) ? a + int'($urandom() % 300) - 150 : int'($urandom() % 131072) - 65536;
      if (b > 65535) b = 65535;
      if (b < -65536) b = -65536;
      ea = 17'(a); eb = 17'(b);
      l = int'($urandom() % 131072) - 65536; r = int'($urandom() % 131072) - 65536;
      left = 18'(l); right = 18'(r); sub = 1'($urandom()); cin = 1'($urandom());
      emax = 18'sd16382; emin = -18'sd16383;
      #1;
      d = (a > b) ? a - b : b - a;
      res = sub ? l - r - 1 + int'(cin) : l + r + int'(cin);
      checks++;
      if (b_gt_a !== (b > a) || ge128 !== (d >= 128) || (d < 128 && shamt !== 7'(d))) begin
        failures++; $display("FAIL diff a=%0d b=%0d", a, b);
      end
      checks++;
      if ($signed(result) !== 18'(res) || ovf !== (res > 16382) || unf !== (res < -16383)) begin
        failures++; $display("FAIL result l=%0d r=%0d sub=%b cin=%b got %0d", l, r, sub, cin, $signed(result));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
