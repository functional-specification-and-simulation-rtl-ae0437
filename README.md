# SPUR floating point co-processor

This is a floating point unit that sits next to a RISC CPU and watches the CPU's
instruction stream. It does not fetch anything itself. Every cycle the CPU shows it the
opcode and register fields of the instruction it just fetched, and the FPU picks out its own
instructions. It runs them in two independent sections that share only a dual-ported register
file:

- the **memory section** moves 64-bit words between the data pins and the registers. Loads
  and stores are pipelined in step with the CPU, and the CPU generates the addresses;
- the **arithmetic section** runs add, subtract, multiply, divide, compare, two converts and
  three transfers. All of them work on an 80-bit extended-precision value, held in an 87-bit
  internal register format.

The two sections run at the same time, and both overlap with the CPU. The hard part of the
design is keeping the FPU in step with a CPU pipeline that can be stalled (a cache miss) or
flushed (a trap) at any moment. Most of the control logic exists to get this right.

The RTL is SystemVerilog with one clock per machine cycle and an asynchronous active-low
reset. It compiles with Verilator 5 and with the slang front end of Yosys.

## CPU interface

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `fpuOPCODE` | in | 7 | opcode of the instruction the CPU fetched |
| `fpuRS1`, `fpuRS2`, `fpuRD` | in | 5 each | register fields; only the low 4 bits address FPU registers |
| `fpuNewInstr` | in | 1 | the opcode wires carry a new instruction this cycle |
| `fpuSuspend` | in | 1 | the CPU pipeline is frozen by a cache miss |
| `dataValid` | in | 1 | cache hit for the current memory cycle |
| `data_in`, `data_out`, `data_oe` | in/out/out | 64/64/1 | the bidirectional data pins, split into read data, drive data and drive enable |
| `fpuBusy` | out | 1 | an arithmetic instruction is running; the CPU must hold the next one |
| `fpuExcep` | out | 1 | bit E of the status word |
| `fpuBrT_F` | out | 1 | bit T/F of the status word; the CPU branches on it after a compare |

Opcodes, in `spur_fpu_pkg.sv`:

| Opcodes | Instructions |
|---|---|
| `0x40`–`0x49` | FADD, FSUB, FMUL, FDIV, FCMP, FABS, FNEG, FMOV, CVTD, CVTS |
| `0x50`–`0x57` | LD_SGL, LD_DBL, LD_EXT1, LD_EXT2, ST_SGL, ST_DBL, ST_EXT1, ST_EXT2 |
| `0x7F` | the CPU's trap, which flushes its pipeline |

These numbers are this implementation's own choice. Any opcode outside these ranges is
ignored.

The decoder (`fpu_decoder`) accepts a memory instruction only when `fpuSuspend` is low. It
accepts an arithmetic instruction only when `fpuBusy` is low. The CPU is expected to hold an
arithmetic instruction on the wires, with `fpuNewInstr` asserted, until it is accepted.

## Internal operand format and status word

Every register holds four separately writable portions:

| Portion | Bits | Contents |
|---|---|---|
| sign | 1 | |
| exponent | 17 | two's complement with a bias of −1: value = 1.f × 2^(exp+1). Zero is the special exponent `0x10000` |
| type | 5 | a 2-bit rounding type (extended, single, double) and a 3-bit data type (zero, denormal, normal, infinity, NaN) |
| fraction | 64 | with an explicit integer bit at bit 63 |

Because the exponent field is wider than any memory format needs, exponents that overflow or
underflow the destination format still fit. The overflow and underflow flags report them.

Register 0 always reads as +0. Register 15 holds the floating point status word (FPSW) in its
fraction:

| Bits | Field |
|---|---|
| 47 | T/F: compare result |
| 46 | E: exception |
| 45:44 | RM: rounding mode (nearest, zero, +inf, −inf) |
| 43 | V: overflow |
| 42 | X: inexact |
| 41 | U: underflow |
| 40 | O: operand trap |
| 39:37 | OT2: data type of the second operand |
| 36:34 | OT1: data type of the first operand |
| 33 | EE: enable E on overflow or underflow |
| 32 | EI: enable E on inexact |

E is set by:
- an operand trap;
- V or U when EE is set;
- X when EI is set.

Register file writes have a fixed priority on register 15: port A first, then the status
port, then port B.

## Memory section

**Ports.** The register file (`fpu_regfile`) has two ports:
- port A belongs to loads and stores, and can write the sign, exponent, type and fraction
  portions separately;
- port B belongs to the arithmetic section, and writes whole registers.

**Pipeline.** The memory control machine (`fpu_mem_ctrl`) carries each accepted memory
instruction down a short pipeline that mirrors the CPU's:

| Stage | Behaviour |
|---|---|
| decode | the instruction is accepted |
| execute (`ldst2`) | holds while `fpuSuspend` is high, so the cycle repeats on a cache miss; cleared by a trap |
| memory (`mem`) | holds while `fpuSuspend` is high; cleared by a trap |
| write (`wr`) | cannot be suspended or trapped; receives a bubble while the memory stage is frozen |

**Loads.**
- The data pins are latched in every cycle in which the memory stage holds a load. A
  suspended memory cycle simply latches again.
- In the write cycle, the load unit (`fpu_load_unit`) converts the latched word and writes
  it on port A. This is the fourth cycle after decode.
- Single and double words are unpacked:
  - the hidden bit is made explicit;
  - the biased exponent is turned into the internal form by complementing its top bit and
    sign-extending from there;
  - denormals get the exponent of the smallest normal;
  - zero gets the special zero exponent;
  - the type field comes from the zero and all-ones detectors.
- Extended values take two loads:
  - LD_EXT1 writes the sign, exponent and type;
  - LD_EXT2 writes the fraction.

**Stores.**
- A store reads register RD on port A in its first execute cycle.
- The store unit (`fpu_store_unit`) packs the register into the memory format.
- The packed word is latched into the output register as the store enters the memory stage.
- `data_oe` is raised from then until the cycle in which `dataValid` reports the hit.
- Extended words are laid out like this:
  - word 1: sign at bit 63, exponent at bits 62:46, type at bits 36:32;
  - word 2: the fraction.

Port A also carries the first operand read of an arithmetic instruction. That read and a
store read never fall in the same cycle, because each happens in the cycle after its own
decode. An assertion in `spur_fpu` checks this.

There is no interlock between a load and a following use of the same register. Software must
leave the load's four cycles before reading the register.

## Arithmetic control: state machine and cycle counter

`fpu_arith_ctrl` has two parts: a cycle counter that sequences the datapath, and an
eight-state machine that decides when the result may be written.

### Cycle counter

- The counter is loaded with 2 at acceptance; the decode cycle is cycle 1.
- It counts one per cycle and stops at the instruction's last execute cycle, raising STOP:

| Instruction class | Last execute cycle | Result written in cycle | `fpuBusy` cycles |
|---|---|---|---|
| add, subtract, compare, converts, transfers | 3 | 4 | 2 |
| multiply | 8 | 9 | 7 |
| divide | 21 | 22 | 20 |

### State machine

| State | Meaning |
|---|---|
| INACTIVE | idle |
| EARLY | the instruction was accepted in a suspended cycle; waits for the suspension to end |
| FIRST, SECOND | the first two unsuspended execute cycles; a trap can still cancel the instruction |
| TRAPPABLE | the CPU is suspended before the instruction got past SECOND, so it may still be trapped |
| PREPARE | the counter finished during a suspension; the result waits |
| SAFE | can no longer be trapped; waiting for STOP |
| WRITE | the result and the new FPSW are written; a new instruction may be accepted in this same cycle |

- A trap returns the machine to INACTIVE from every state except SAFE and WRITE.
- `fpuBusy` is high in every state except INACTIVE and WRITE. This lets the decode of the
  next arithmetic instruction overlap the write of the previous one.

## Arithmetic datapath

`fpu_arith_dp` holds the operand and destination latches. It connects four units, each
controlled by the counter value and the one-hot opcode vector.

### Cycle 2: operands

- Both operands are read and latched: RS1 on port A, RS2 on port B.
- **Add, subtract, compare.** The exponent box (`fpu_expbox`) compares the exponents:
  - it runs two subtractors in parallel and gives a 7-bit shift amount plus a "128 or more"
    flag;
  - the operand with the larger exponent goes to the left adder input;
  - the other operand goes through the right shifter, which forms guard, round and sticky
    bits. A shift of 128 or more leaves only a sticky bit.
- **Converts.** The operand is shifted right by a fixed 40 places (to single) or 11 places
  (to double). The single or double LSB then sits just above the rounding bits.
- **Multiply and divide.**
  - The fraction adder forms the two's complement of the second fraction.
  - The multiply/divide loop is loaded.
  - The exponent box forms ea+eb+1 or ea−eb−1; the constant corrects the bias of −1.

### Fraction box (`fpu_fracbox`, `fpu_roundnorm`)

Every result fraction passes through here in the last execute cycle.

1. A 66-bit adder. The left operand is complemented for a subtraction, and the guard, round
   and sticky bits ride along below it.
2. A negative sum is only exclusive-ORed with its sign, giving the ones' complement of the
   magnitude. The sign becomes the intermediate sign.
3. The magnitude is classified by the normalization it needs: right 1, none, left 1, or
   left more than 1.
4. The first three classes are aligned at once. A small rounding table then takes the L, G,
   R and S bits and the intermediate sign. It first adds the one that completes a
   complement: at S for "no shift", and at R after a left shift by one. A right shift never
   follows a negative sum. The table then decides the rounding and returns the new L bit,
   plus at most one increment for the upper 63 bits. One incrementer serves both purposes.
   Its carry out is folded back into the top bit and counted in the exponent.
5. The "left more than 1" case can only come from a cancellation, so it is exact. It goes
   unshifted through the same incrementer (for the complement only) and on to a
   priority-encoded left shifter.
6. The normalizing distance is returned to the exponent box, which adjusts the preliminary
   exponent.
7. Converts force the "no shift" path, so rounding happens at the single or double LSB.

### Multiply/divide loop (`fpu_muldiv`)

**Multiply.**
- Radix-4 Booth recoding. Each loop takes 8 multiplier bits as four overlapping groups.
- Each group selects one of +M, +2M, −M, −2M or nothing.
- The four selected multiples and the previous carry-save pair go through four carry-save
  rows.
- Two loops run per clock. Nine loops cover a 64-bit multiplier (8.5 effective).
- After each loop the pair moves right eight places. A rounding adder sums the eight bits
  that fall out. Its carry goes into the next loop, and each finished byte is ORed into a
  sticky bit.
- At the end, the fraction box adds the two vectors. The top bit of the last rounding byte
  fills the result LSB and the next bit is the guard bit. The round bit is 0, and the other
  six bits join the sticky bit.

**Divide.**
- SRT radix 4, with quotient digits −2..2.
- Each loop adds the top 8 bits of the two partial-remainder vectors. That estimate, together
  with the top 4 divisor bits, chooses the digit.
- The digit's multiple of the divisor is added in carry-save form.
- Positive and negative digits go into two separate quotient vectors. The fraction box
  subtracts one from the other at the end.
- 34 loops give 65 quotient bits plus 3 rounding bits.
- The sign of the final remainder is latched one cycle before the end. It corrects the last
  quotient bit, and a nonzero remainder sets sticky.

**How the digit is chosen.** The digit becomes k+1 once the estimate reaches
⌈16·(k+⅓)·(d+1)/8⌉ for k ≥ 0, or ⌈16·(k+⅓)·d/8⌉ for k < 0. Here d is the 4-bit divisor
prefix (8..15) and the estimate is in units of 1/16. These thresholds keep the partial
remainder within ±⅔ of the divisor for every divisor with that prefix.

### Sign, type and exceptions (`fpu_signtype`)

**Result sign.**
- Multiply and divide: the exclusive-OR of the operand signs.
- Add and subtract: the first operand's sign when the effective operation is an addition.
  Otherwise, the adder's intermediate sign tells which operand was larger.
- An exact zero difference is +0, except when rounding toward −∞.
- Transfers: FMOV keeps the sign, FNEG inverts it, FABS clears it.

**Result type.** The type is ZERO or NORM, with the rounding type of the destination
precision.

**Operand traps.**
- Infinities and NaNs trap for every arithmetic operation except the transfers.
- Denormals trap for multiply and divide.
- A zero divisor traps.

A trap sets O, writes the operand types into OT1 and OT2, and cancels the result write.

**Compare.** Compare writes no register. It sets T/F when the relation between the operands
is one of those selected by the low three bits of RD, read as a {less, equal, greater} mask.

The V, X and U flags describe only the last instruction; they are not sticky.

## Differences from the original description

- **Clock.** One clock stands for the four-phase machine cycle. Events that fall on different
  phases of one cycle happen within the same clock here.
- **Cycle counts.** The overview gives 4, 4, 8 and 20 cycles for add, subtract, multiply and
  divide. The detailed signal timing writes results in cycles 4, 9 and 22. The RTL follows
  the detailed timing.
- **Multiply accumulator width.** The carry-save window is 128 bits wide. This keeps the
  negative Booth multiples exact without sign-extension constants. The original width is not
  given.
- **Rounding carry.** The carry of the rounding adder goes into the next loop's rounding
  addition instead of into the carry vector. The weight is the same. At the end the finished
  top bit of the last rounding byte is placed in the L position. The fraction box therefore
  needs no carry input from the rounding adder.
- **Divide digit selection.** Digit selection uses all eight estimate bits with the
  thresholds above, instead of a six-bit estimate.
- **Denormals.** Denormalized results are never produced. An out-of-range result keeps its
  wide internal exponent and raises V or U. This matches the original exception table:
  overflow, underflow and inexact are signalled, and support software produces the exact
  IEEE value.
- **Unnormalized operands.** A denormal operand is handled exactly in the form a load
  produces: the smallest exponent of its precision, added to or subtracted from an operand
  whose exponent is not smaller. An unnormalized fraction paired with an operand of smaller
  exponent can lose its sticky information. The normalization path treats any result that
  needs a left shift of two or more as exact, and that assumption holds only for normalized
  operands. The case needs a denormal together with an extended-range value below the
  smallest normal of the denormal's precision, for example a product smaller than 2^-1022
  added to a double denormal.
- **Interlocks.** There is none for load-use or store-after-load hazards. The original says
  nothing about such hazards.
- **Chosen by this implementation.** The opcode numbers, the FPSW register (15) and the
  single `dataValid` hit input.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

The end-to-end test, `tb_spur_fpu`, drives the top-level ports the way a CPU and cache would:
- it injects random suspensions and cache misses;
- it models the data memory;
- it checks every result against an exact 256-bit reference in all four rounding modes;
- it also runs directed sequences for traps, operand exceptions, overflow, underflow, compare
  branches, and load/store round trips.

It counts how often each mechanism happened and fails if any never did. The mechanisms are:
suspended loads and stores, store data held until the hit, EARLY, TRAPPABLE, PREPARE, SAFE,
decode/write overlap, busy stalls, memory and arithmetic in parallel, both kinds of trap, and
every FPSW flag.

`tb_fpu_arith_dp` checks the datapath alone. It uses full 64-bit extended fractions and
double denormal operands.
`tb_fpu_arith_ctrl` checks the 3/8/21-cycle latencies.

To simulate, list the package first:

```
verilator --binary --timing --assert -Irtl rtl/spur_fpu_pkg.sv \
  $(ls rtl/*.sv | grep -v spur_fpu_pkg) tb/tb_spur_fpu.sv \
  --top-module tb_spur_fpu -Mdir obj_tb
./obj_tb/Vtb_spur_fpu
```

Swap in any other testbench name to run a single block.

## Files

| File | Contents |
|---|---|
| `rtl/spur_fpu_pkg.sv` | formats, opcodes, FPSW bit positions, latencies |
| `rtl/spur_fpu.sv` | top level |
| `rtl/fpu_decoder.sv` | opcode filter, trap detect, accept logic |
| `rtl/fpu_mem_ctrl.sv` | load/store pipeline and data latches |
| `rtl/fpu_load_unit.sv`, `rtl/fpu_store_unit.sv` | memory-format conversion |
| `rtl/fpu_regfile.sv` | dual-ported register file |
| `rtl/fpu_arith_ctrl.sv` | state machine and cycle counter |
| `rtl/fpu_arith_dp.sv` | arithmetic datapath and its sequencing |
| `rtl/fpu_fracbox.sv`, `rtl/fpu_roundnorm.sv` | fraction adder, rounding, normalization |
| `rtl/fpu_expbox.sv` | exponent difference and result ALU |
| `rtl/fpu_muldiv.sv` | Booth multiply / SRT divide loop |
| `rtl/fpu_signtype.sv` | sign, type, exceptions, new FPSW |
