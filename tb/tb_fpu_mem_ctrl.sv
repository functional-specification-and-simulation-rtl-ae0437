// tb_fpu_mem_ctrl -- the memory pipeline under random loads, stores, suspensions, cache hits
// and traps, checked cycle by cycle against a model of the three stages (execute and memory
// held by a suspension and cleared by a trap; write stage taking zero when suspended).
// Checked: which register is written by a load and with which word (the data present in the
// last memory cycle), the portion enables, the word a store drives (the register contents in
// its first execute cycle, even if the register changes later), and the pad enable (from the
// start of the memory cycle until the cycle with the cache hit).
module tb_fpu_mem_ctrl;
  import spur_fpu_pkg::*;
  logic clk = 0, rst_n = 0;
  memop_t accept;
  logic trap, suspend, dataValid, a_read, a_we_sign, a_we_exp, a_we_type, a_we_frac, data_oe;
  logic [63:0] data_in, data_out;
  logic [3:0] a_raddr, a_waddr;
  fpreg_t a_rdata, a_wdata;
  int checks = 0, failures = 0;
  fpreg_t regs [16];

  fpu_mem_ctrl dut (.*);
  always #5 clk = ~clk;
  assign a_rdata = regs[a_raddr];

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic v, ld, st, fresh; int op, rd; logic [63:0] sword; } ms_t;
  ms_t m2, mm, mw;
  logic [63:0] mlatch;
  logic mhit;

  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    accept = '0; trap = 0; suspend = 0; dataValid = 1; data_in = 0;
    for (int i = 0; i < 16; i++) regs[i] = {$urandom(), $urandom(), $urandom()};
    m2 = '{default: 0}; mm = '{default: 0}; mw = '{default: 0}; mlatch = 0; mhit = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      logic isld, isst;
      int op, rd;
      @(negedge clk);
      suspend = ($urandom() % 4 == 0);
      dataValid = !suspend || ($urandom() % 2 == 0);
      trap = ($urandom() % 50 == 0);
      data_in = {$urandom(), $urandom()};
      op = $urandom() % 8; rd = $urandom() % 16;
      accept = '0;
      if ($urandom() % 3 != 0 && !suspend) begin
        accept.op = 8'd1 << op; accept.load = op < 4; accept.store = op >= 4; accept.rd = 5'(rd);
      end
      #1;
      // outputs of this cycle
      if (mw.v && mw.ld) begin
        chk(a_waddr == 4'(mw.rd), "load write address");
        chk({a_we_sign, a_we_exp, a_we_type, a_we_frac} ==
            ((mw.op == 2) ? 4'b1110 : (mw.op == 3) ? 4'b0001 : 4'b1111), "portion enables");
        if (mw.op == 3) chk(a_wdata.frac == mlatch, "load data");
        if (mw.op == 2) chk(a_wdata.exp == mlatch[62:46] && a_wdata.sign == mlatch[63], "load ext1 data");
      end else begin
        chk({a_we_sign, a_we_exp, a_we_type, a_we_frac} == 4'b0, "no load write");
      end
      chk(data_oe == (mm.v && mm.st && !mhit), $sformatf("pad enable n=%0d", n));
      if (mm.v && mm.st && data_oe && mm.op == 7) chk(data_out == mm.sword, "store data");
      // registers change behind the pipeline's back
      regs[$urandom() % 16] = {$urandom(), $urandom(), $urandom()};
      // model update at the clock edge; the store operand is the register read in the
      // first execute cycle
      if (m2.fresh) begin m2.sword = regs[m2.rd].frac; m2.fresh = 0; end
      if (mm.v && mm.ld) mlatch = data_in;
      if (!suspend || trap) mhit = 0;
      else if (mm.v && mm.st && dataValid) mhit = 1;
      mw = suspend ? '{default: 0} : mm;
      if (trap) begin m2 = '{default: 0}; mm = '{default: 0}; end
      else if (!suspend) begin
        mm = m2;
        m2 = '{v: accept.op != 0, ld: accept.load, st: accept.store, fresh: accept.op != 0, op: op, rd: rd, sword: 0};
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
