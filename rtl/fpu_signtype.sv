// fpu_signtype -- sign and type determination, operand exception detection and the new
// floating point status word (FPSW).
//
// Sign: transfers take the operand sign (FMOV), its complement (FNEG) or zero (FABS);
// converts keep it; multiply and divide take the exclusive-OR of the operand signs. For add,
// subtract and compare the sign depends on the operand signs and relative magnitudes: when
// the effective operation is an addition the result takes the first operand's sign;
// otherwise the operand with the greater exponent sits on the left of the fraction adder, and
// a negative intermediate result (inter_neg) means the left operand had the greater
// magnitude, so the result takes its sign, else the sign of the right operand. An exact zero
// difference is positive except when rounding toward minus infinity.
// Type: the result data type comes only from the zero detect (ZERO or NORM); the rounding
// type is extended, or single/double for the two converts.
// Operand exceptions follow the exception table: infinities and NaNs trap for add, subtract,
// compare, multiply, divide and convert; denormals trap for multiply and divide; a zero
// divisor traps. Such an exception sets the O flag and cancels the result write.
// FPSW: T/F (compare only), E, V (overflow), X (inexact), U (underflow), O (operand trap),
// the operand data types OT2 and OT1, while RM, EE and EI are kept. E is raised for an
// operand trap, for overflow or underflow when EE is set, and for inexact when EI is set.
// Compare sets T/F when the relation of the first operand to the second is one of those
// selected by the RD field of the instruction, read as a {less, equal, greater} mask.
//
// Interface: decoded opcode vector, operand signs and types, greater-exponent flag,
// intermediate sign, zero detects, range and inexact flags, rounding mode, compare mask and
// the current FPSW in; sign, result type, operand exception, FPSW write enable and new FPSW
// out. Purely combinational; the arithmetic datapath latches the results.
//
// Which signals decide the sign and the type, the exception table and the FPSW fields follow
// the document. The enable logic for E, the compare mask and the non-sticky flags are this
// design's choices.
module fpu_signtype
  import spur_fpu_pkg::*;
(
  input  logic [9:0]  opv,
  input  logic        sa,
  input  logic        sb,
  input  logic [4:0]  ta,
  input  logic [4:0]  tb,
  input  logic        b_gt_a,
  input  logic        inter_neg,
  input  logic        sum_zero,     // adder output (with rounding bits) is zero
  input  logic        res_zero,     // rounded, normalized result is zero
  input  logic        ovf,
  input  logic        unf,
  input  logic        inexact,
  input  logic [1:0]  rm,
  input  logic [2:0]  cmp_mask,     // {less, equal, greater}
  input  logic [63:0] fpsw_in,
  output logic        sign,
  output logic [4:0]  rtype,
  output logic        op_exc,
  output logic        fpsw_we,
  output logic [63:0] fpsw_new
);

  function automatic logic infnan(input logic [4:0] t);
    return (t[2:0] == DT_INF) || (t[2:0] == DT_NAN);
  endfunction

  logic add_cls, sbe, eff_sub, s_left, s_right, lt, eq, gt, cond, xfer, v, u, x, e;

  always_comb begin
    add_cls = opv[A_ADD] | opv[A_SUB] | opv[A_CMP];
    xfer    = opv[A_MOV] | opv[A_NEG] | opv[A_ABS];
    sbe     = sb ^ (opv[A_SUB] | opv[A_CMP]);
    eff_sub = sa ^ sbe;
    s_left  = b_gt_a ? sbe : sa;
    s_right = b_gt_a ? sa : sbe;

    priority case (1'b1)
      opv[A_MOV]:               sign = sa;
      opv[A_NEG]:               sign = !sa;
      opv[A_ABS]:               sign = 1'b0;
      opv[A_MUL] | opv[A_DIV]:  sign = sa ^ sb;
      add_cls: begin
        if (!eff_sub)      sign = sa;
        else if (sum_zero) sign = (rm == RM_MINF);
        else               sign = inter_neg ? s_left : s_right;
      end
      default:                  sign = sa;
    endcase
  end

  // Kept apart from the sign: the sign feeds directed rounding, which feeds res_zero.
  always_comb begin

    rtype[2:0] = res_zero ? DT_ZERO : DT_NORM;
    rtype[4:3] = opv[A_CVTS] ? RT_SGL : (opv[A_CVTD] ? RT_DBL : RT_EXT);

    op_exc = 1'b0;
    if (add_cls)                       op_exc = infnan(ta) | infnan(tb);
    if (opv[A_CVTD] | opv[A_CVTS])     op_exc = infnan(ta);
    if (opv[A_MUL] | opv[A_DIV])
      op_exc = infnan(ta) | infnan(tb) | (ta[2:0] == DT_DENORM) | (tb[2:0] == DT_DENORM);
    if (opv[A_DIV] && tb[2:0] == DT_ZERO) op_exc = 1'b1;

    // compare: A - B
    eq   = sum_zero;
    lt   = !sum_zero && sign;
    gt   = !sum_zero && !sign;
    cond = |(cmp_mask & {lt, eq, gt});

    v = ovf && !res_zero && !op_exc && !opv[A_CMP];
    u = unf && !res_zero && !op_exc && !opv[A_CMP];
    x = inexact && !op_exc && !opv[A_CMP];
    e = op_exc | (fpsw_in[FPSW_EE] & (v | u)) | (fpsw_in[FPSW_EI] & x);

    fpsw_we  = (opv != '0) && !xfer;
    fpsw_new = fpsw_in;
    if (opv[A_CMP]) fpsw_new[FPSW_TF] = cond && !op_exc;
    fpsw_new[FPSW_E] = e;
    fpsw_new[FPSW_V] = v;
    fpsw_new[FPSW_X] = x;
    fpsw_new[FPSW_U] = u;
    fpsw_new[FPSW_O] = op_exc;
    fpsw_new[FPSW_OT2 +: 3] = (opv[A_CVTD] | opv[A_CVTS]) ? 3'b000 : tb[2:0];
    fpsw_new[FPSW_OT1 +: 3] = ta[2:0];
  end

endmodule
