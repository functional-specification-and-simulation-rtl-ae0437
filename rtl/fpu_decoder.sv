// fpu_decoder -- instruction decoder: opcode filter, trap detect, accept logic and register
// specifier selection.
//
// Every cycle the decoder looks at the instruction the CPU sends on the opcode and register
// specifier wires. While fpuNewInstr is asserted the opcode is decoded into:
//   trap      the trap opcode was received; takes effect in the same cycle,
//   arith_vec a one-hot vector of the ten arithmetic operations,
//   mem_st    a memory opcode station (one-hot operation, load/store composites, RD),
// both vectors being empty for a trap or for an opcode that is not the FPU's. In parallel the
// accept logic decides whether to start the instruction: a memory operation is accepted only
// when fpuSuspend is low, an arithmetic operation only when the arithmetic unit is not busy.
// The decoder also picks the register specifiers for the register file read: RS1 and RS2 for
// arithmetic operations. (A store reads its RD register through the memory pipeline.)
//
// Interface: fpuOPCODE[6:0], fpuRS1/RS2/RD[4:0], fpuNewInstr, fpuSuspend, busy in; trap,
// arith_start, arith_vec, mem_accept (15-bit station, zero when not accepted), rs1/rs2 out.
// Purely combinational: the control machines latch its outputs at the end of the decode cycle.
//
// The two decoded vectors, trap-received straight from the opcode, the accept conditions and
// the register specifier routing follow the document. Opcode numbers are this design's own.
module fpu_decoder
  import spur_fpu_pkg::*;
(
  input  logic [6:0] fpuOPCODE,
  input  logic [4:0] fpuRS1,
  input  logic [4:0] fpuRS2,
  input  logic [4:0] fpuRD,
  input  logic       fpuNewInstr,
  input  logic       fpuSuspend,
  input  logic       busy,          // arithmetic unit busy (fpuBusy)
  output logic       trap,
  output logic       arith_start,
  output logic [9:0] arith_vec,
  output memop_t     mem_accept,
  output logic [3:0] rs1,
  output logic [3:0] rs2
);

  logic [9:0] av;
  logic [7:0] mv;

  always_comb begin
    av = '0;
    mv = '0;
    trap = 1'b0;
    if (fpuNewInstr) begin
      unique case (fpuOPCODE)
        OP_FADD:    av[A_ADD]  = 1'b1;
        OP_FSUB:    av[A_SUB]  = 1'b1;
        OP_FMUL:    av[A_MUL]  = 1'b1;
        OP_FDIV:    av[A_DIV]  = 1'b1;
        OP_FCMP:    av[A_CMP]  = 1'b1;
        OP_FABS:    av[A_ABS]  = 1'b1;
        OP_FNEG:    av[A_NEG]  = 1'b1;
        OP_FMOV:    av[A_MOV]  = 1'b1;
        OP_CVTD:    av[A_CVTD] = 1'b1;
        OP_CVTS:    av[A_CVTS] = 1'b1;
        OP_LD_SGL:  mv[M_LD_SGL]  = 1'b1;
        OP_LD_DBL:  mv[M_LD_DBL]  = 1'b1;
        OP_LD_EXT1: mv[M_LD_EXT1] = 1'b1;
        OP_LD_EXT2: mv[M_LD_EXT2] = 1'b1;
        OP_ST_SGL:  mv[M_ST_SGL]  = 1'b1;
        OP_ST_DBL:  mv[M_ST_DBL]  = 1'b1;
        OP_ST_EXT1: mv[M_ST_EXT1] = 1'b1;
        OP_ST_EXT2: mv[M_ST_EXT2] = 1'b1;
        OP_TRAP:    trap = 1'b1;
        default:    ;
      endcase
    end

    arith_vec   = av;
    arith_start = (av != '0) && !busy;

    mem_accept = '0;
    if (mv != '0 && !fpuSuspend) begin
      mem_accept.op    = mv;
      mem_accept.load  = |mv[3:0];
      mem_accept.store = |mv[7:4];
      mem_accept.rd    = fpuRD;
    end

    rs1 = fpuRS1[3:0];
    rs2 = fpuRS2[3:0];
  end

endmodule
