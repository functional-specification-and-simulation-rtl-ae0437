// spur_fpu -- the SPUR floating point co-processor, top level.
//
// A tightly coupled co-processor that watches every instruction the CPU fetches. Floating
// point instructions are decoded here and run in one of two independent sections that share
// only the dual-ported register file:
//   - the memory section (loads and stores, four-stage opcode pipeline, load and store
//     datapaths, register bus A), which moves 64-bit words between the data pins and the
//     registers; the CPU generates the addresses;
//   - the arithmetic section (state machine and cycle counter, fraction box, exponent box,
//     multiply/divide loop, sign and type logic, register bus B), which runs add, subtract,
//     multiply, divide, compare, the two converts and the three transfers on 80-bit
//     extended-precision operands held in an 87-bit internal format.
// Memory instructions overlap with arithmetic ones and with the CPU; consecutive arithmetic
// instructions are serialised by fpuBusy, the write cycle of one overlapping the decode of the
// next. fpuSuspend (a CPU cache miss) repeats the memory pipeline's execute and memory stages
// and delays arithmetic result writes; a trap opcode kills the memory instructions in flight
// and arithmetic instructions that are still trappable. fpuExcep and fpuBrT_F are the E and
// T/F bits of the status word in register 15.
//
// Interface: CPU instruction wires fpuOPCODE, fpuRS1, fpuRS2, fpuRD, fpuNewInstr,
// fpuSuspend; the cache hit dataValid; the data pins split into data_in, data_out and data_oe;
// status outputs fpuBusy, fpuExcep, fpuBrT_F. One clock per machine cycle, asynchronous
// active-low reset. Latencies from decode to result write: 3 cycles for add-class and
// transfer instructions (write in cycle 4), 8 for multiply, 21 for divide; loads write their
// register in the fourth cycle after decode, stores drive the pads from the third.
//
// The partition into sections, the signal set and the bus sharing follow the document. Bus A
// is shared by the store read and the first operand read of an arithmetic instruction; the
// two never fall in the same cycle, since each reads in the cycle after its own decode. The
// data pins as separate in/out/enable signals and the single cache hit input are this
// design's choices.
module spur_fpu
  import spur_fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [6:0]  fpuOPCODE,
  input  logic [4:0]  fpuRS1,
  input  logic [4:0]  fpuRS2,
  input  logic [4:0]  fpuRD,
  input  logic        fpuNewInstr,
  input  logic        fpuSuspend,
  input  logic        dataValid,
  input  logic [63:0] data_in,
  output logic [63:0] data_out,
  output logic        data_oe,
  output logic        fpuBusy,
  output logic        fpuExcep,
  output logic        fpuBrT_F
);

  // decoder
  logic       trap, arith_start;
  logic [9:0] arith_vec;
  memop_t     mem_accept;
  logic [3:0] dec_rs1, dec_rs2;

  // arithmetic control
  logic [4:0] cnt;
  logic [9:0] opv;
  logic       write_en;

  // register file
  logic [3:0] a_raddr, b_raddr, a_waddr, b_waddr, mem_raddr, ar_addr;
  fpreg_t     a_rdata, b_rdata, a_wdata, b_wdata;
  logic       a_we_sign, a_we_exp, a_we_type, a_we_frac, b_we, fpsw_we;
  logic [63:0] fpsw, fpsw_wdata;
  logic       mem_read, arith_read, dest_we, dp_fpsw_we;

  fpu_decoder u_dec (
    .fpuOPCODE(fpuOPCODE), .fpuRS1(fpuRS1), .fpuRS2(fpuRS2), .fpuRD(fpuRD),
    .fpuNewInstr(fpuNewInstr), .fpuSuspend(fpuSuspend), .busy(fpuBusy),
    .trap(trap), .arith_start(arith_start), .arith_vec(arith_vec), .mem_accept(mem_accept),
    .rs1(dec_rs1), .rs2(dec_rs2)
  );

  fpu_arith_ctrl u_actl (
    .clk(clk), .rst_n(rst_n), .start(arith_start), .opv_in(arith_vec),
    .suspend(fpuSuspend), .trap(trap),
    .state(), .cnt(cnt), .opv(opv), .stop(), .busy(fpuBusy), .write_en(write_en)
  );

  fpu_arith_dp u_adp (
    .clk(clk), .rst_n(rst_n), .start(arith_start), .rs1(dec_rs1), .rs2(dec_rs2), .rd(fpuRD),
    .cnt(cnt), .opv(opv), .ra_addr(ar_addr), .rb_addr(b_raddr), .reading(arith_read),
    .ra(a_rdata), .rb(b_rdata), .fpsw_in(fpsw),
    .dest(b_wdata), .dest_addr(b_waddr), .dest_we(dest_we),
    .fpsw_we(dp_fpsw_we), .fpsw_new(fpsw_wdata)
  );

  fpu_mem_ctrl u_mctl (
    .clk(clk), .rst_n(rst_n), .accept(mem_accept), .trap(trap), .suspend(fpuSuspend),
    .dataValid(dataValid), .data_in(data_in),
    .a_raddr(mem_raddr), .a_read(mem_read), .a_rdata(a_rdata),
    .a_waddr(a_waddr), .a_we_sign(a_we_sign), .a_we_exp(a_we_exp), .a_we_type(a_we_type),
    .a_we_frac(a_we_frac), .a_wdata(a_wdata),
    .data_out(data_out), .data_oe(data_oe)
  );

  assign a_raddr = arith_read ? ar_addr : mem_raddr;
  assign b_we    = write_en && dest_we;
  assign fpsw_we = write_en && dp_fpsw_we;

  fpu_regfile u_rf (
    .clk(clk), .rst_n(rst_n),
    .a_raddr(a_raddr), .a_rdata(a_rdata), .a_waddr(a_waddr),
    .a_we_sign(a_we_sign), .a_we_exp(a_we_exp), .a_we_type(a_we_type), .a_we_frac(a_we_frac),
    .a_wdata(a_wdata),
    .b_raddr(b_raddr), .b_rdata(b_rdata), .b_waddr(b_waddr), .b_we(b_we), .b_wdata(b_wdata),
    .fpsw_we(fpsw_we), .fpsw_wdata(fpsw_wdata), .fpsw(fpsw)
  );

  assign fpuExcep = fpsw[FPSW_E];
  assign fpuBrT_F = fpsw[FPSW_TF];

  // Bus A is never wanted by a store and an arithmetic instruction in the same cycle.
  a_bus_single_reader: assert property (@(posedge clk) !(arith_read && mem_read));

endmodule
