// tb_fpu_muldiv -- self-checking test of the multiply/divide loop.
//
// Random 64-bit normalized fractions are multiplied and divided. The multiply check adds the
// returned carry-save high parts with the carry input and compares them, and the guard and
// sticky bits, with the exact 128-bit product. The divide check forms the final quotient the
// way the fraction box will (high parts subtracted with the 3-bit subtractor's carry) and
// compares it with floor(dividend * 2^66 / divisor), and the sticky bit with the remainder.
// Loop latency is checked: 5 cycles after the load for a multiply, 17 for a divide.
module tb_fpu_muldiv;
  import spur_fpu_pkg::*;

  logic clk = 0, rst_n = 0;
  logic load, div, remsign;
  logic [63:0] mcd, mpr;
  logic [65:0] neg_mcd;
  logic busy, done, q_carry, rem_neg, rem_nonzero;
  logic [64:0] mul_hi_s, mul_hi_c, q_pos, q_neg;
  logic [2:0] mul_rbits, q_rbits;
  int checks = 0, failures = 0;

  fpu_muldiv dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic d, input logic [63:0] a, input logic [63:0] b, output int cyc);
    mcd = b; mpr = a; div = d; neg_mcd = -{2'b00, b};
    load = 1;
    @(posedge clk); #1;
    load = 0;
    cyc = 0;
    while (!done) begin @(posedge clk); #1; cyc++; end
  endtask

  initial begin
    logic [127:0] p;
    logic [131:0] num, q, r;
    logic [64:0] hi;
    logic [67:0] qf;
    logic [65:0] diff;
    int cyc;
    load = 0; div = 0; mcd = 0; mpr = 0; neg_mcd = 0; remsign = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic [63:0] a, b;
      a = {$urandom(), $urandom()}; b = {$urandom(), $urandom()};
      a[63] = 1'b1; b[63] = 1'b1;
      if (n == 0) begin a = 64'h8000_0000_0000_0000; b = 64'hffff_ffff_ffff_ffff; end
      if (n == 1) begin a = 64'hffff_ffff_ffff_ffff; b = 64'hffff_ffff_ffff_ffff; end
      // multiply
      run(1'b0, a, b, cyc);
      p  = 128'(a) * 128'(b);
      hi = mul_hi_s + mul_hi_c;
      checks++;
      if (hi !== p[127:63] || mul_rbits[2] !== p[62] || mul_rbits[1] !== 1'b0 ||
          mul_rbits[0] !== (|p[61:0])) begin
        failures++;
        $display("MUL mismatch a=%h b=%h hi=%h exp=%h rb=%b", a, b, hi, p[127:63], mul_rbits);
      end
      checks++;
      if (cyc != 5) begin failures++; $display("MUL latency %0d", cyc); end
      // divide
      run(1'b1, a, b, cyc);
      remsign = rem_neg;
      #1;
      num  = 132'(a) << 66;
      q    = num / 132'(b);
      r    = num % 132'(b);
      diff = {1'b0, q_pos} - {1'b0, q_neg} - 66'(!q_carry);
      qf   = {diff[64:0], q_rbits};
      checks++;
      if (qf[67:1] !== q[67:1] || qf[0] !== (q[0] | (r != 0))) begin
        failures++;
        $display("DIV mismatch a=%h b=%h got=%h exp=%h r=%0d", a, b, qf, q[67:0], r != 0);
      end
      checks++;
      if (cyc != 17) begin failures++; $display("DIV latency %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
