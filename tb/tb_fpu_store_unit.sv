// tb_fpu_store_unit -- checks the store datapath: a load unit converts random single and
// double words to internal format, the store unit must give back the same word (with a
// zeroed lower half for single), and extended operands must be packed field by field.
// Combinational.
module tb_fpu_store_unit;
  import spur_fpu_pkg::*;
  logic [3:0]  lop, sop;
  logic [63:0] w, back;
  fpreg_t      r;
  logic        e1, e2, e3, e4;
  int checks = 0, failures = 0;

  fpu_load_unit  u_ld (.op(lop), .data(w), .wdata(r), .we_sign(e1), .we_exp(e2), .we_type(e3), .we_frac(e4));
  fpu_store_unit dut  (.op(sop), .src(r), .data(back));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [63:0] x, want;
      x = {$urandom(), $urandom()};
      if (n % 10 == 1) x[62:52] = 0;                 // double zero / denormal
      if (n % 10 == 2) x[62:55] = 0;                 // single zero / denormal
      if (n % 20 == 3) x[51:0] = 0;
      case (n % 3)
        0: begin lop = 4'b0010; sop = 4'b0010; w = x; want = x; end
        1: begin lop = 4'b0001; sop = 4'b0001; w = x; want = {x[63:32], 32'b0}; end
        default: begin
          // extended: a word-1 through the load unit's extraction, fraction from word 2
          lop = 4'b0100; sop = 4'b0100; w = {x[63:46], 9'b0, x[36:32], 32'b0}; want = w;
        end
      endcase
      #1;
      checks++;
      if (back !== want) begin
        failures++;
        $display("FAIL n=%0d w=%h back=%h want=%h", n, w, back, want);
      end
    end
    // ST_EXT2: fraction
    sop = 4'b1000; lop = 4'b0010; w = 64'h3ff8_0000_0000_0001; #1;
    checks++;
    if (back !== {1'b1, 52'h8_0000_0000_0001, 11'b0}) begin failures++; $display("FAIL ext2 %h", back); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
