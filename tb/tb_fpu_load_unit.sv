// tb_fpu_load_unit -- checks the load datapath against IEEE values decoded independently.
//
// Random single and double words (normal, zero, denormal, infinity, NaN) are converted; the
// testbench decodes each word by the IEEE rules into a value m * 2^e and compares it with the
// internal operand (fraction with leading bit at 63, exponent with bias -1), and checks the
// data type, rounding type and portion write enables. Extended words must be split field by
// field. Combinational: one check set per word.
module tb_fpu_load_unit;
  import spur_fpu_pkg::*;
  logic [3:0]  op;
  logic [63:0] data;
  fpreg_t      wdata;
  logic        we_sign, we_exp, we_type, we_frac;
  int checks = 0, failures = 0;

  fpu_load_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic dbl;
      int ew, bias, fw, e, kind;
      logic [63:0] w;
      logic [51:0] f;
      logic [10:0] ex;
      logic [2:0] dt;
      logic [63:0] mfrac;
      int texp;
      dbl = n[0];
      ew = dbl ? 11 : 8; fw = dbl ? 52 : 23; bias = dbl ? 1023 : 127;
      kind = $urandom() % 5;
      f = {$urandom(), $urandom()};
      f = f & ((52'd1 << fw) - 1);
      ex = 11'($urandom()) & 11'((1 << ew) - 1);
      if (kind == 0) begin ex = 0; f = 0; end
      if (kind == 1) begin ex = 0; if (f == 0) f = 1; end
      if (kind == 2) begin ex = 11'((1 << ew) - 1); f = (n % 3 == 0) ? 0 : (f | 1); end
      if (kind >= 3 && (ex == 0 || ex == 11'((1 << ew) - 1))) ex = 1;
      w = dbl ? {1'($urandom()), ex, f} : {1'($urandom()), ex[7:0], f[22:0], 32'($urandom())};
      op = dbl ? 4'b0010 : 4'b0001;
      data = w;
      #1;
      if (ex == 11'((1 << ew) - 1)) dt = (f == 0) ? DT_INF : DT_NAN;
      else if (ex == 0)             dt = (f == 0) ? DT_ZERO : DT_DENORM;
      else                          dt = DT_NORM;
      chk(wdata.sign == w[63], "sign");
      chk(wdata.typ == {dbl ? RT_DBL : RT_SGL, dt}, $sformatf("type %b w=%h", wdata.typ, w));
      chk(we_sign && we_exp && we_type && we_frac, "enables");
      if (dt == DT_NORM || dt == DT_DENORM) begin
        // value = (hidden.f) * 2^(e - bias), e = max(ex,1)
        mfrac = (64'(ex != 0) << 63) | (64'(f) << (63 - fw));
        texp  = ((ex == 0) ? 1 : int'(ex)) - bias;
        chk(wdata.frac == mfrac && int'($signed(wdata.exp)) == texp - 1,
            $sformatf("value w=%h frac=%h exp=%0d want %h %0d", w, wdata.frac, int'($signed(wdata.exp)), mfrac, texp - 1));
      end else if (dt == DT_ZERO) begin
        chk(wdata.exp == EZERO && wdata.frac == 0, "zero");
      end
    end
    // extended words
    for (int n = 0; n < 200; n++) begin
      logic [63:0] w;
      w = {$urandom(), $urandom()};
      op = 4'b0100; data = w; #1;
      chk(wdata.sign == w[63] && wdata.exp == w[62:46] && wdata.typ == w[36:32], "ext1 fields");
      chk(we_sign && we_exp && we_type && !we_frac, "ext1 enables");
      op = 4'b1000; #1;
      chk(wdata.frac == w && !we_sign && !we_exp && !we_type && we_frac, "ext2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
