// tb_fpu_fracbox -- the fraction box with aligned operands as the add/subtract datapath
// delivers them: a normalized left fraction and a normalized right fraction shifted right by
// 0..70 places with its guard, round and sticky bits. The exact sum or difference is formed
// in wide integers, rounded to 64 bits in the selected mode and compared with the fraction,
// the exponent adjustment, the zero and inexact flags and the intermediate sign.
module tb_fpu_fracbox;
  import spur_fpu_pkg::*;
  logic [64:0] left, right;
  logic [2:0] rbits;
  logic sub, cin, md, sign, force_pass, inter_neg, norm_sub, zero, inexact;
  logic [1:0] rm;
  logic [65:0] sum;
  logic [63:0] frac;
  logic [6:0] normdist;
  int checks = 0, failures = 0;

  fpu_fracbox dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [63:0] fl, fr;
      logic [199:0] wl, wr, v, keep, rem, half;
      int k, p, adj, want_adj;
      logic neg, inc, inx;
      logic [63:0] want;
      fl = {1'b1, $urandom(), 31'($urandom())};
      fr = {1'b1, $urandom(), 31'($urandom())};
      if (n % 8 == 0) fr = fl ^ 64'($urandom() % 16);          // heavy cancellation
      k = (n % 3 == 0) ? 0 : int'($urandom() % 71);
      if (n % 8 == 0) k = $urandom() % 2;
      wl = 200'(fl) << 130;
      wr = (200'(fr) << 130) >> k;
      left = {1'b0, wl[193:130]};
      right = {1'b0, wr[193:130]};
      rbits = {wr[129], wr[128], |wr[127:0]};
      // what the hardware sees: the right operand truncated to G, R, S
      wr = {wr[199:128], (|wr[127:0]) ? 1'b1 : 1'b0, 127'b0};
      sub = 1'($urandom()); cin = sub; md = 1'b0; force_pass = 1'b0;
      rm = 2'($urandom()); sign = 1'($urandom());
      #1;
      neg = sub && (wl > wr);
      v = sub ? (neg ? wl - wr : wr - wl) : wl + wr;
      checks++;
      if (v == 0) begin
        if (!zero) begin failures++; $display("FAIL zero"); end
        continue;
      end
      p = 0;
      for (int i = 0; i < 200; i++) if (v[i]) p = i;
      keep = v >> (p - 63);
      rem  = v & ((200'd1 << (p - 63)) - 1);
      half = 200'd1 << (p - 64);
      inx = rem != 0;
      case (rm)
        RM_NEAREST: inc = rem > half || (rem == half && keep[0]);
        RM_ZERO:    inc = 0;
        RM_PINF:    inc = !sign && inx;
        default:    inc = sign && inx;
      endcase
      keep = keep + 200'(inc);
      want_adj = p - 193;
      if (keep[64]) begin keep = keep >> 1; want_adj++; end
      want = keep[63:0];
      adj = norm_sub ? -int'(normdist) : int'(normdist);
      if (frac !== want || adj != want_adj || zero || inexact !== inx || inter_neg !== neg) begin
        failures++;
        $display("FAIL n=%0d k=%0d sub=%b rm=%0d frac=%h want=%h adj=%0d want=%0d inx=%b/%b neg=%b/%b",
                 n, k, sub, rm, frac, want, adj, want_adj, inexact, inx, inter_neg, neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
