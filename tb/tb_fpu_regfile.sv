// tb_fpu_regfile -- random reads and writes on both busses and the status port, checked
// against a model array: register 0 always reads zero, bus A writes only the enabled
// portions, on register 15 bus A wins over the status port, which wins over bus B. Writes
// appear on the reads of the next cycle.
module tb_fpu_regfile;
  import spur_fpu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] a_raddr, a_waddr, b_raddr, b_waddr;
  fpreg_t a_rdata, b_rdata, a_wdata, b_wdata;
  logic a_we_sign, a_we_exp, a_we_type, a_we_frac, b_we, fpsw_we;
  logic [63:0] fpsw_wdata, fpsw;
  int checks = 0, failures = 0;
  fpreg_t model [16];
  localparam fpreg_t Z = '{sign: 1'b0, exp: EZERO, typ: 5'b0, frac: '0};

  fpu_regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fpreg_t rnd();
    return {$urandom(), $urandom(), $urandom()};
  endfunction

  initial begin
    for (int i = 0; i < 16; i++) model[i] = Z;
    {a_raddr, a_waddr, b_raddr, b_waddr, a_we_sign, a_we_exp, a_we_type, a_we_frac, b_we, fpsw_we} = '0;
    a_wdata = '0; b_wdata = '0; fpsw_wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // check reads of the current state
      a_raddr = 4'($urandom()); b_raddr = 4'($urandom());
      #1;
      checks += 3;
      if (a_rdata !== model[a_raddr]) begin failures++; $display("FAIL A r%0d %h %h", a_raddr, a_rdata, model[a_raddr]); end
      if (b_rdata !== model[b_raddr]) begin failures++; $display("FAIL B r%0d", b_raddr); end
      if (fpsw !== model[15].frac) begin failures++; $display("FAIL fpsw"); end
      // random writes
      a_waddr = 4'($urandom()); b_waddr = (n % 5 == 0) ? a_waddr : 4'($urandom());
      {a_we_sign, a_we_exp, a_we_type, a_we_frac} = 4'($urandom());
      b_we = 1'($urandom()); fpsw_we = ($urandom() % 4 == 0);
      a_wdata = rnd(); b_wdata = rnd(); fpsw_wdata = {$urandom(), $urandom()};
      @(posedge clk);
      if (b_we && b_waddr != 0) model[b_waddr] = b_wdata;
      if (fpsw_we) model[15].frac = fpsw_wdata;
      if (a_waddr != 0) begin
        if (a_we_sign) model[a_waddr].sign = a_wdata.sign;
        if (a_we_exp)  model[a_waddr].exp  = a_wdata.exp;
        if (a_we_type) model[a_waddr].typ  = a_wdata.typ;
        if (a_we_frac) model[a_waddr].frac = a_wdata.frac;
      end
      @(negedge clk);
      {a_we_sign, a_we_exp, a_we_type, a_we_frac, b_we, fpsw_we} = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
