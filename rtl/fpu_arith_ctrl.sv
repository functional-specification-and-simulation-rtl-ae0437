// fpu_arith_ctrl -- arithmetic control machine: supervisory state machine and machine cycle
// counter.
//
// The cycle counter sequences the arithmetic datapath: it is loaded with 2 when an arithmetic
// instruction is accepted (cycle 1 being the decode cycle), counts one per cycle, and stops at
// the last execute cycle of the instruction (3 for add-class and transfer instructions, 8 for
// multiply, 21 for divide), raising STOP. It is never stopped by a suspension. The state
// machine watches fpuSuspend and the trap signal while the counter runs and decides when the
// result may be written:
//   INACTIVE  idle; a start goes to FIRST, or to EARLY when the start cycle is suspended
//   EARLY     suspended right after decode; waits for the suspension to end, then FIRST
//   FIRST     first unsuspended execute cycle; trappable
//   SECOND    second unsuspended execute cycle; trappable
//   TRAPPABLE passed two cycles but the CPU pipeline is suspended, so it may still be trapped
//   PREPARE   finished while suspended: counter held, waiting to write
//   SAFE      can no longer be trapped; waiting for STOP
//   WRITE     result write; may start the next instruction in the same cycle
// The trap signal overrides every transition: in the trappable states (and in WRITE for an
// instruction just started) the machine returns to INACTIVE and the counter is cleared. A
// trap in SAFE or WRITE does not cancel the write. fpuBusy is high in every state except
// INACTIVE and WRITE, so the decode of the next arithmetic instruction overlaps the write.
//
// Interface: start and the one-hot opcode vector from the decoder, suspend, trap; outputs the
// state, the counter, STOP, busy, the write strobe and the latched opcode vector. One clock
// per machine cycle.
//
// The eight states, their transition vectors <start, suspend, STOP>, the trap override, the
// counter behaviour and busy/overlap follow the document. The counter width, its start value
// and the per-instruction stop values are this design's, set from the cycle of the result
// write for each instruction class.
module fpu_arith_ctrl
  import spur_fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [9:0]  opv_in,
  input  logic        suspend,
  input  logic        trap,
  output astate_e     state,
  output logic [4:0]  cnt,
  output logic [9:0]  opv,
  output logic        stop,
  output logic        busy,
  output logic        write_en
);

  astate_e    nstate;
  logic [4:0] last;

  always_comb begin
    if (opv[A_DIV])      last = LAST_DIV;
    else if (opv[A_MUL]) last = LAST_MUL;
    else                 last = LAST_ADD;
    stop = (cnt == last);
  end

  always_comb begin
    nstate = state;
    unique case (state)
      S_INACTIVE:  if (start) nstate = suspend ? S_EARLY : S_FIRST;
      S_EARLY:     if (!suspend) nstate = S_FIRST;
      S_FIRST:     if (!suspend) nstate = S_SECOND;
      S_SECOND,
      S_TRAPPABLE: begin
        if (suspend) nstate = stop ? S_PREPARE : S_TRAPPABLE;
        else         nstate = stop ? S_WRITE : S_SAFE;
      end
      S_PREPARE:   if (!suspend) nstate = S_WRITE;
      S_SAFE:      if (stop) nstate = S_WRITE;
      S_WRITE:     begin
        if (!start)       nstate = S_INACTIVE;
        else if (suspend) nstate = S_EARLY;
        else              nstate = S_FIRST;
      end
      default:     nstate = S_INACTIVE;
    endcase
    if (trap && state != S_SAFE && !(state == S_WRITE && !start)) nstate = S_INACTIVE;
  end

  assign busy     = (state != S_INACTIVE) && (state != S_WRITE);
  assign write_en = (state == S_WRITE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_INACTIVE;
      cnt   <= '0;
      opv   <= '0;
    end else begin
      state <= nstate;
      if ((state == S_INACTIVE || state == S_WRITE) && start && !trap) begin
        cnt <= 5'd2;
        opv <= opv_in;
      end else if (nstate == S_INACTIVE || state == S_WRITE) begin
        cnt <= '0;
        if (nstate == S_INACTIVE) opv <= '0;
      end else if (!stop) begin
        cnt <= cnt + 5'd1;
      end
    end
  end

endmodule
