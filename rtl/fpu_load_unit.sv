// fpu_load_unit -- load datapath: memory word to internal register format.
//
// The word held in the external data latch is split into its four portions, each on its own
// logic path, and a multiplexor per portion picks the path of the load being executed.
//   LD_EXT1  first word of an extended value: sign (63), 17-bit exponent (62:46) and 5-bit type
//            (36:32) are extracted as they are; only those three portions are written.
//   LD_EXT2  second word: the 64-bit fraction; only the fraction portion is written.
//   LD_DBL   IEEE double: sign 63, exponent 62:52, fraction 51:0.
//   LD_SGL   IEEE single in the upper half: sign 63, exponent 62:55, fraction 54:32.
// For single and double the biased exponent is converted to the internal 17-bit two's
// complement form with bias -1 by complementing its top bit and sign-extending from there; a
// zero exponent field becomes the special zero exponent (zero) or is read as 1 (denormal, so
// that the explicit fraction keeps its value). The hidden bit is made explicit at fraction
// bit 63 and the fraction field is aligned below it. The data type is found from the exponent
// and fraction fields and the rounding type records the source precision.
//
// Interface: one-hot `op` (LD_SGL, LD_DBL, LD_EXT1, LD_EXT2), 64-bit `data`; outputs the
// operand and four portion write enables for register bus A. Purely combinational; the memory
// control applies it in the write stage.
//
// Portion paths, multiplexing by load kind, extended layout, the complement-and-sign-extend
// exponent conversion and the explicit hidden bit follow the document. The data type and
// rounding type codes and the denormal exponent rule are this design's choices.
module fpu_load_unit
  import spur_fpu_pkg::*;
(
  input  logic [3:0]  op,        // {LD_EXT2, LD_EXT1, LD_DBL, LD_SGL}
  input  logic [63:0] data,
  output fpreg_t      wdata,
  output logic        we_sign,
  output logic        we_exp,
  output logic        we_type,
  output logic        we_frac
);

  // Classification shared by single and double.
  function automatic logic [2:0] classify(input logic e_zero, input logic e_ones,
                                          input logic f_zero);
    if (e_ones)      return f_zero ? DT_INF : DT_NAN;
    else if (e_zero) return f_zero ? DT_ZERO : DT_DENORM;
    else             return DT_NORM;
  endfunction

  logic [7:0]  es;
  logic [10:0] ed;
  logic [22:0] fs;
  logic [51:0] fd;
  fpreg_t      sgl, dbl, ext;

  always_comb begin
    es = data[62:55];
    fs = data[54:32];
    ed = data[62:52];
    fd = data[51:0];

    sgl.sign = data[63];
    if (es == '0) sgl.exp = (fs == '0) ? EZERO : {{10{1'b1}}, 7'b0000001};
    else          sgl.exp = {{10{~es[7]}}, es[6:0]};
    sgl.typ  = {RT_SGL, classify(es == '0, es == '1, fs == '0)};
    sgl.frac = {es != '0, fs, 40'b0};

    dbl.sign = data[63];
    if (ed == '0) dbl.exp = (fd == '0) ? EZERO : {{7{1'b1}}, 10'b0000000001};
    else          dbl.exp = {{7{~ed[10]}}, ed[9:0]};
    dbl.typ  = {RT_DBL, classify(ed == '0, ed == '1, fd == '0)};
    dbl.frac = {ed != '0, fd, 11'b0};

    ext.sign = data[63];
    ext.exp  = data[62:46];
    ext.typ  = data[36:32];
    ext.frac = data;

    priority case (1'b1)
      op[M_LD_SGL]:  wdata = sgl;
      op[M_LD_DBL]:  wdata = dbl;
      default:       wdata = ext;
    endcase
    we_sign = op[M_LD_SGL] | op[M_LD_DBL] | op[M_LD_EXT1];
    we_exp  = we_sign;
    we_type = we_sign;
    we_frac = op[M_LD_SGL] | op[M_LD_DBL] | op[M_LD_EXT2];
  end

endmodule
