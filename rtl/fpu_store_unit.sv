// fpu_store_unit -- store datapath: internal register format to memory word.
//
// The operand's portions, held in the store input latches, are packed into the 64-bit word
// for the external data latch:
//   ST_EXT1  {sign, 17-bit exponent, 9 zero bits, 5-bit type, 32 zero bits}
//   ST_EXT2  the 64-bit fraction
//   ST_DBL   sign, 11-bit biased exponent, the 52 fraction bits below the integer bit
//   ST_SGL   sign, 8-bit biased exponent, 23 fraction bits, in the upper half; lower half zero
// Only the exponent needs converting for single and double, by the inverse of the load
// conversion: its low bits are kept and the top bit of the field is complemented. A zero or
// denormal operand (as its data type says) stores an all-zero exponent field. The fraction is
// truncated to the format: the value is expected to have been rounded to that precision by a
// convert instruction before it is stored.
//
// Interface: one-hot `op` (ST_SGL, ST_DBL, ST_EXT1, ST_EXT2), the operand `src`; output the
// memory word. Purely combinational.
//
// The conversion rule (exponent only, special case for zero and denormal from the type field,
// select-and-pack for the rest) and the extended layout follow the document; truncation
// of the fraction is this design's reading.
module fpu_store_unit
  import spur_fpu_pkg::*;
(
  input  logic [3:0]  op,        // {ST_EXT2, ST_EXT1, ST_DBL, ST_SGL}
  input  fpreg_t      src,
  output logic [63:0] data
);

  logic        tiny;
  logic [7:0]  es;
  logic [10:0] ed;

  always_comb begin
    tiny = (src.typ[2:0] == DT_ZERO) || (src.typ[2:0] == DT_DENORM);
    es    = tiny ? 8'h00  : {~src.exp[7], src.exp[6:0]};
    ed    = tiny ? 11'h000 : {~src.exp[10], src.exp[9:0]};
    priority case (1'b1)
      op[M_ST_SGL - 4]:  data = {src.sign, es, src.frac[62:40], 32'b0};
      op[M_ST_DBL - 4]:  data = {src.sign, ed, src.frac[62:11]};
      op[M_ST_EXT1 - 4]: data = {src.sign, src.exp, 9'b0, src.typ, 32'b0};
      default:           data = src.frac;
    endcase
  end

endmodule
