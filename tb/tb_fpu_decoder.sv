// tb_fpu_decoder -- every 7-bit opcode with every combination of fpuNewInstr, fpuSuspend and
// busy: the trap, the one-hot arithmetic vector, the memory station and the accept conditions
// (memory only when not suspended, arithmetic only when not busy) are compared with a table.
module tb_fpu_decoder;
  import spur_fpu_pkg::*;
  logic [6:0] fpuOPCODE;
  logic [4:0] fpuRS1, fpuRS2, fpuRD;
  logic fpuNewInstr, fpuSuspend, busy, trap, arith_start;
  logic [9:0] arith_vec;
  memop_t mem_accept;
  logic [3:0] rs1, rs2;
  int checks = 0, failures = 0;

  fpu_decoder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 128; o++) for (int c = 0; c < 8; c++) begin
      logic [9:0] av;
      logic [7:0] mv;
      int ai, mi;
      fpuOPCODE = 7'(o); {fpuNewInstr, fpuSuspend, busy} = 3'(c);
      fpuRS1 = 5'($urandom()); fpuRS2 = 5'($urandom()); fpuRD = 5'($urandom());
      #1;
      ai = (o >= 'h40 && o <= 'h49) ? o - 'h40 : -1;
      mi = (o >= 'h50 && o <= 'h57) ? o - 'h50 : -1;
      av = (fpuNewInstr && ai >= 0) ? (10'd1 << ai) : 10'd0;
      mv = (fpuNewInstr && mi >= 0) ? (8'd1 << mi) : 8'd0;
      checks++;
      if (arith_vec !== av || arith_start !== (av != 0 && !busy) ||
          trap !== (fpuNewInstr && o == 'h7f) ||
          mem_accept.op !== ((fpuSuspend) ? 8'd0 : mv) ||
          mem_accept.load !== (!fpuSuspend && mv[3:0] != 0) ||
          mem_accept.store !== (!fpuSuspend && mv[7:4] != 0) ||
          (mv != 0 && !fpuSuspend && mem_accept.rd !== fpuRD) ||
          rs1 !== fpuRS1[3:0] || rs2 !== fpuRS2[3:0]) begin
        failures++;
        $display("FAIL op=%h ctl=%b", o, c[2:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
