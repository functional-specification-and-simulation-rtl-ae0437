// fpu_mem_ctrl -- memory control machine: the opcode pipeline for loads and stores, with the
// data latches at both ends of the load and store datapaths.
//
// A memory instruction accepted by the decoder becomes a 15-bit station (one-hot operation,
// load and store composites, destination register) that moves through three latched stages
// after decode: execute (ldst2), memory (mem) and write (wr).
//   - ldst2 and mem hold their contents while fpuSuspend is high, so the execute and memory
//     cycles repeat on a cache miss; both are cleared by a trap.
//   - wr can be neither suspended nor trapped: it takes the memory stage, or zero if the
//     memory stage is suspended.
// Loads need nothing until the memory cycle: the external data latch is loaded from the data
// pins in every cycle in which the memory stage holds a load, and in the write cycle the latch
// goes through the load unit onto register bus A. A suspended memory cycle simply loads the
// latch again in the next cycle. Stores read their register (RD) on bus A in the first
// execute cycle, into the store input latch; the packed word is placed in the output data
// latch when the store moves to the memory stage, and the pads are driven from the start of
// the memory cycle until the cycle in which the cache reports a hit (dataValid).
//
// Interface: accept (station from the decoder, already gated by fpuSuspend), trap, suspend,
// dataValid, data_in; bus A read address/data; bus A write address, data and portion enables;
// data_out and data_oe for the pads. One clock per machine cycle, asynchronous reset.
//
// The stage structure, suspend feedback, trap clear, the unsuspendable write stage, the load
// latch rule and pad driving until the hit follow the document. Reading the store operand in
// the first execute cycle rather than during decode, and using one combined cache hit input,
// are this design's choices.
module fpu_mem_ctrl
  import spur_fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  memop_t      accept,
  input  logic        trap,
  input  logic        suspend,
  input  logic        dataValid,
  input  logic [63:0] data_in,
  // register bus A
  output logic [3:0]  a_raddr,
  output logic        a_read,      // bus A read wanted by a store this cycle
  input  fpreg_t      a_rdata,
  output logic [3:0]  a_waddr,
  output logic        a_we_sign,
  output logic        a_we_exp,
  output logic        a_we_type,
  output logic        a_we_frac,
  output fpreg_t      a_wdata,
  // pads
  output logic [63:0] data_out,
  output logic        data_oe
);

  memop_t      ldst2, mem, wr;
  logic        fresh;          // ldst2 holds a station in its first cycle
  fpreg_t      st_latch;       // store input latch
  logic [63:0] ld_latch;       // external data latch, load side
  logic [63:0] out_latch;      // external data latch, store side
  logic        hit_seen;       // the store in mem has had its cache hit
  logic [63:0] packed_word;
  fpreg_t      st_src;

  // Store packing from the register read (first cycle) or the store latch.
  assign st_src = fresh ? a_rdata : st_latch;

  fpu_store_unit u_store (
    .op  (ldst2.op[7:4]),
    .src (st_src),
    .data(packed_word)
  );

  fpu_load_unit u_load (
    .op     (wr.op[3:0]),
    .data   (ld_latch),
    .wdata  (a_wdata),
    .we_sign(a_we_sign),
    .we_exp (a_we_exp),
    .we_type(a_we_type),
    .we_frac(a_we_frac)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ldst2     <= '0;
      mem       <= '0;
      wr        <= '0;
      fresh     <= 1'b0;
      st_latch  <= '0;
      ld_latch  <= '0;
      out_latch <= '0;
      hit_seen  <= 1'b0;
    end else begin
      // pipeline
      if (trap) begin
        ldst2 <= '0;
        mem   <= '0;
      end else if (!suspend) begin
        ldst2 <= accept;
        mem   <= ldst2;
      end
      wr    <= suspend ? '0 : mem;
      fresh <= !trap && !suspend && (accept.op != '0);

      // store side
      if (fresh) st_latch <= a_rdata;
      if (!trap && !suspend && ldst2.store) out_latch <= packed_word;
      if (!suspend || trap) hit_seen <= 1'b0;
      else if (mem.store && dataValid) hit_seen <= 1'b1;

      // load side
      if (mem.load) ld_latch <= data_in;
    end
  end

  assign a_raddr  = ldst2.rd[3:0];
  assign a_read   = fresh && ldst2.store;
  assign a_waddr  = wr.rd[3:0];
  assign data_out = out_latch;
  assign data_oe  = mem.store && !hit_seen;

endmodule
