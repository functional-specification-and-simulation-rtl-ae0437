// tb_fpu_arith_dp -- the arithmetic datapath driven the way the control machine drives it:
// a start cycle latching the register specifiers, then counter values 2 up to the stop value
// of the instruction. Operands are random extended values with full 64-bit fractions. The
// destination latch and the new status word are compared with exact references (256-bit
// products, quotients with a remainder sticky bit, aligned sums) rounded to 64 bits, or to 53
// and 24 bits for the converts, in a random rounding mode. One operation in ten uses a
// double denormal first operand (the form a load produces: smallest double exponent, integer
// bit clear) for add, subtract and convert-to-double, which must handle it exactly.
module tb_fpu_arith_dp;
  import spur_fpu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, reading, dest_we, fpsw_we;
  logic [3:0] rs1, rs2, ra_addr, rb_addr, dest_addr;
  logic [4:0] rd, cnt;
  logic [9:0] opv;
  fpreg_t ra, rb, dest;
  logic [63:0] fpsw_in, fpsw_new;
  int checks = 0, failures = 0, n_denorm = 0;
  fpreg_t regs [16];

  fpu_arith_dp dut (.*);
  always #5 clk = ~clk;
  assign ra = regs[ra_addr];
  assign rb = regs[rb_addr];

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rnd(input logic [255:0] m, input int scale, input int prec, input logic [1:0] rm,
                     input logic s, output logic [63:0] frac, output int texp, output logic inx);
    int p, sh;
    logic [255:0] keep, rem, half;
    logic inc;
    p = 0;
    for (int i = 0; i < 256; i++) if (m[i]) p = i;
    sh = p - (prec - 1);
    if (sh <= 0) begin
      // exact: fewer significant bits than the precision
      frac = 64'(m << (64 - prec - sh));
      texp = scale + p;
      inx = 0;
      return;
    end
    keep = m >> sh;
    rem = m & ((256'd1 << sh) - 256'd1);
    half = 256'd1 << (sh - 1);
    inx = rem != 0;
    case (rm)
      RM_NEAREST: inc = rem > half || (rem == half && keep[0]);
      RM_ZERO:    inc = 0;
      RM_PINF:    inc = !s && inx;
      default:    inc = s && inx;
    endcase
    keep = keep + 256'(inc);
    if (keep[prec]) begin keep = keep >> 1; p++; end
    frac = 64'(keep << (64 - prec));
    texp = scale + p;
  endtask

  initial begin
    start = 0; rs1 = 0; rs2 = 0; rd = 0; cnt = 0; opv = 0; fpsw_in = 0;
    for (int i = 0; i < 16; i++) regs[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      int k, last, ea, eb, scale, texp, d;
      logic [63:0] fa, fb, frac;
      logic [255:0] m, x, y;
      logic sa, sb, s, inx, zero;
      logic [1:0] rm;
      case (n % 6)
        0: k = A_ADD; 1: k = A_SUB; 2: k = A_MUL; 3: k = A_DIV; 4: k = A_CVTD; default: k = A_CVTS;
      endcase
      fa = {1'b1, $urandom(), 31'($urandom())}; fb = {1'b1, $urandom(), 31'($urandom())};
      ea = int'($urandom() % 200) - 100; eb = (n % 12 < 6) ? ea + int'($urandom() % 5) - 2 : int'($urandom() % 200) - 100;
      if (n % 24 == 1) begin fb = fa; eb = ea; end
      sa = 1'($urandom()); sb = 1'($urandom());
      rm = 2'($urandom());
      // double denormal first operand, as a load delivers it: exponent of the smallest normal
      // double, integer bit clear, 52 fraction bits; the second operand is not smaller
      if (n % 5 == 3 && (k == A_ADD || k == A_SUB || k == A_CVTD)) begin
        fa = {1'b0, fa[62:11] >> ($urandom() % 20), 11'b0};
        ea = -1022;
        eb = -1022 + int'($urandom() % 3);
        n_denorm++;
      end
      regs[1] = '{sign: sa, exp: 17'(ea - 1), typ: {RT_EXT, fa[63] ? DT_NORM : DT_DENORM}, frac: fa};
      regs[2] = '{sign: sb, exp: 17'(eb - 1), typ: {RT_EXT, DT_NORM}, frac: fb};
      fpsw_in = 0; fpsw_in[FPSW_RM +: 2] = rm;
      last = (k == A_DIV) ? 21 : (k == A_MUL) ? 8 : 3;
      @(negedge clk);
      start = 1; rs1 = 1; rs2 = 2; rd = 5'd3; opv = 0; cnt = 0;
      @(negedge clk);
      start = 0; opv = 10'd1 << k;
      for (int c = 2; c <= last; c++) begin
        cnt = 5'(c);
        @(negedge clk);
      end
      // repeat the last step once, as when the write is delayed
      @(negedge clk);
      // reference: value = f * 2^(e-63)
      s = sa;
      case (k)
        A_MUL: begin m = 256'(fa) * 256'(fb); scale = ea + eb - 126; s = sa ^ sb; end
        A_DIV: begin
          m = (256'(fa) << 180) / 256'(fb);
          m = (m << 1) | 256'(((256'(fa) << 180) % 256'(fb)) != 0);
          scale = ea - eb - 181; s = sa ^ sb;
        end
        A_CVTD, A_CVTS: begin m = 256'(fa); scale = ea - 63; end
        default: begin
          logic sbe;
          int lo;
          sbe = sb ^ (k == A_SUB);
          lo = (ea < eb) ? ea : eb;
          d = (ea > eb) ? ea - eb : eb - ea;
          if (d > 150) begin
            if (ea > eb) begin eb = ea - 150; fb = 1; end else begin ea = eb - 150; fa = 1; end
            lo = (ea < eb) ? ea : eb;
          end
          x = 256'(fa) << (ea - lo); y = 256'(fb) << (eb - lo);
          scale = lo - 63;
          if (sa == sbe) begin m = x + y; s = sa; end
          else if (x > y) begin m = x - y; s = sa; end
          else if (y > x) begin m = y - x; s = sbe; end
          else begin m = 0; s = (rm == RM_MINF); end
        end
      endcase
      zero = (m == 0);
      checks++;
      if (zero) begin
        if (!(dest.exp == EZERO && dest.frac == 0 && dest.sign == s && dest.typ[2:0] == DT_ZERO && dest_we)) begin
          failures++; $display("FAIL zero n=%0d", n);
        end
      end else begin
        logic [16:0] wexp;
        rnd(m, scale, (k == A_CVTS) ? 24 : (k == A_CVTD) ? 53 : 64, rm, s, frac, texp, inx);
        wexp = 17'(texp - 1);
        if (dest.frac !== frac || dest.exp !== wexp || dest.sign !== s || !dest_we || dest_addr != 3 ||
            fpsw_new[FPSW_X] !== inx || !fpsw_we ||
            dest.typ !== {(k == A_CVTS) ? RT_SGL : (k == A_CVTD) ? RT_DBL : RT_EXT, DT_NORM}) begin
          failures++;
          $display("FAIL n=%0d op=%0d rm=%0d got %b %h %h x=%b want %b %h %h x=%b", n, k, rm,
                   dest.sign, dest.exp, dest.frac, fpsw_new[FPSW_X], s, wexp, frac, inx);
        end
      end
      opv = 0; cnt = 0;
    end
    $display("denormal operands: %0d", n_denorm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
