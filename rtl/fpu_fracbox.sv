// fpu_fracbox -- the fraction box: fraction adder/subtractor plus rounding and normalization.
//
// Every arithmetic result fraction passes through this block. The adder takes a left and a
// right 65-bit operand (two integer bits, 63 fraction bits); the three rounding bits (guard,
// round, sticky) always belong to the right operand and bypass the adder, which keeps it 66
// bits wide. Subtraction complements the left operand and adds it to the right one, so the
// carry input is 1 for an add/subtract-class subtraction; the divide supplies its own carry
// input and the multiply uses 0. The 66-bit signed sum with the rounding bits below it is a
// 69-bit two's complement value. In add/subtract mode a negative sum is reported as the
// intermediate sign and its 68 low bits are exclusive-ORed with that sign, leaving the ones'
// complement of the magnitude; fpu_roundnorm adds the missing one with the incrementer it
// also uses for rounding. In multiply/divide mode the sum is taken modulo 2^65 and is always
// positive. The raw sum is also an output: with a zero right operand it is the two's
// complement of the left operand, which is how the multiplicand and divisor complements are
// made.
//
// Operand widths, the rounding bits riding on the right operand, subtraction as
// complement-left-and-add, the carry input from the multiply/divide unit, the exclusive-OR
// with the intermediate sign and the increment left to the rounding stage follow the
// document. Purely combinational; the surrounding datapath holds the input and destination
// latches.
module fpu_fracbox
  import spur_fpu_pkg::*;
(
  input  logic [64:0] left,
  input  logic [64:0] right,
  input  logic [2:0]  rbits,      // G, R, S of the right operand
  input  logic        sub,        // complement the left operand
  input  logic        cin,        // adder carry input
  input  logic        md,         // multiply/divide mode: sum modulo 2^65, never negated
  input  logic [1:0]  rm,
  input  logic        sign,       // final result sign, for directed rounding
  input  logic        force_pass, // convert instructions
  output logic [65:0] sum,        // raw signed adder output
  output logic        inter_neg,  // intermediate sign
  output logic [63:0] frac,
  output logic [6:0]  normdist,
  output logic        norm_sub,
  output logic        zero,
  output logic        inexact
);

  logic [67:0] v;
  logic [67:0] mag;

  always_comb begin
    sum       = {1'b0, right} + (sub ? ~{1'b0, left} : {1'b0, left}) + 66'(cin);
    inter_neg = sum[65] && !md;
    v         = {sum[64:0], rbits};
    mag       = v ^ {68{inter_neg}};
  end

  fpu_roundnorm u_rn (
    .mag       (mag),
    .cmpl      (inter_neg),
    .rm        (rm),
    .sign      (sign),
    .force_pass(force_pass),
    .frac      (frac),
    .normdist  (normdist),
    .norm_sub  (norm_sub),
    .zero      (zero),
    .inexact   (inexact)
  );

endmodule
