// fpu_regfile -- dual-ported FPU register file, split into sign, exponent, type and fraction.
//
// Sixteen registers of one internal-format operand each. Register 0 always reads as zero
// (positive zero: type ZERO, exponent EZERO, fraction 0) and ignores writes. Register 15
// holds the floating point status word (FPSW) in its fraction portion; besides the two
// normal write ports it has a status port through which the arithmetic unit posts the new
// FPSW at the end of each arithmetic instruction.
//
// Port A serves the load/store datapath; port B the arithmetic datapath. Both ports read
// combinationally from the address given during the cycle (the reads of a cycle see the
// writes of earlier cycles). Writes happen at the clock edge. Port A has a write enable per
// portion, because LD_EXT1 writes sign, exponent and type only and LD_EXT2 the fraction only;
// port B writes whole operands. On register 15 port A has priority over the status port,
// which has priority over port B.
//
// From the document: sixteen registers, dual porting with separate A (memory) and B
// (arithmetic) busses for both reads and writes, per-portion controls on bus A only, a
// hardwired zero register, one register reserved for the FPSW. Which register holds the FPSW,
// the write priorities and the encoding of the zero in register 0 are this design's choices.
module fpu_regfile
  import spur_fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // port A (load/store)
  input  logic [3:0]  a_raddr,
  output fpreg_t      a_rdata,
  input  logic [3:0]  a_waddr,
  input  logic        a_we_sign,
  input  logic        a_we_exp,
  input  logic        a_we_type,
  input  logic        a_we_frac,
  input  fpreg_t      a_wdata,
  // port B (arithmetic)
  input  logic [3:0]  b_raddr,
  output fpreg_t      b_rdata,
  input  logic [3:0]  b_waddr,
  input  logic        b_we,
  input  fpreg_t      b_wdata,
  // status word
  input  logic        fpsw_we,
  input  logic [63:0] fpsw_wdata,
  output logic [63:0] fpsw
);

  fpreg_t regs [NREGS];

  localparam fpreg_t ZERO_REG = '{sign: 1'b0, exp: EZERO, typ: {RT_EXT, DT_ZERO}, frac: '0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= ZERO_REG;
    end else begin
      for (int i = 1; i < NREGS; i++) begin
        if (b_we && b_waddr == 4'(i)) regs[i] <= b_wdata;
        if (i == FPSW_REG && fpsw_we) regs[i].frac <= fpsw_wdata;
        if (a_waddr == 4'(i)) begin
          if (a_we_sign) regs[i].sign <= a_wdata.sign;
          if (a_we_exp)  regs[i].exp  <= a_wdata.exp;
          if (a_we_type) regs[i].typ  <= a_wdata.typ;
          if (a_we_frac) regs[i].frac <= a_wdata.frac;
        end
      end
    end
  end

  assign a_rdata = (a_raddr == 4'd0) ? ZERO_REG : regs[a_raddr];
  assign b_rdata = (b_raddr == 4'd0) ? ZERO_REG : regs[b_raddr];
  assign fpsw    = regs[FPSW_REG].frac;

endmodule
