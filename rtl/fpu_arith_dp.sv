// fpu_arith_dp -- arithmetic datapath: operand latches, alignment shifter, fraction box,
// exponent box, multiply/divide loop and sign/type logic, sequenced by the cycle counter.
//
// Register specifiers are latched when the instruction is accepted; both operands are read
// from the register file in the first execute cycle (counter value 2) and latched. The
// counter value and the decoded opcode then select what each unit does:
//   count 2  add, subtract, compare: the exponent difference section finds the operand with
//            the greater exponent, which is routed to the left adder input; the other fraction
//            goes through the right shifter, which also forms guard, round and sticky bits
//            (shifts of 128 or more leave only a sticky bit). The greater exponent is the
//            preliminary exponent.
//            convert: the operand is shifted right by a fixed amount (40 places to single, 11
//            to double) so that the target LSB lands just above the rounding bits; the
//            exponent ALU adds the same amount to form the preliminary exponent.
//            multiply, divide: the fraction box subtracts the second operand's fraction from
//            zero and the loop is loaded with the operands and this complement; the exponent
//            ALU forms ea+eb+1 (multiply) or ea-eb-1 (divide).
//   count 3  add-class and convert: fraction box add/subtract, rounding and normalization;
//            the exponent ALU adjusts the preliminary exponent by the normalizing distance;
//            sign and type logic; results go to the destination latches.
//            transfers: the operand goes to the destination latches with its new sign.
//   count 8  multiply: the fraction box adds the loop's sum and carry vectors, with the
//            rounding bits from the loop's rounding adder, then as for count 3.
//   count 20 divide: the sign of the final remainder is latched and fed back to the loop.
//   count 21 divide: the fraction box subtracts the negative from the positive quotient
//            vector, then as for count 3.
// The last step of each instruction only depends on latched values, so repeating it while
// the counter is held at its stop value gives the same result.
//
// Interface: start (to latch the register specifiers), the specifiers, the counter and the
// latched opcode vector; read addresses and data of the two register busses; the current
// FPSW; outputs the destination latch, write enables for the result and the FPSW, and the new
// FPSW. One clock per machine cycle. Results are written by the top in the write state.
//
// The routing (greater exponent left, lesser through the right shifter), the fixed convert
// shift, the fraction box complement for multiply/divide, the two-step exponent, the final
// remainder sign feedback and the cycles in which results are written follow the document.
// The schedule within those cycles is this design's.
module fpu_arith_dp
  import spur_fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [3:0]  rs1,
  input  logic [3:0]  rs2,
  input  logic [4:0]  rd,
  input  logic [4:0]  cnt,
  input  logic [9:0]  opv,
  output logic [3:0]  ra_addr,
  output logic [3:0]  rb_addr,
  output logic        reading,     // operands are read this cycle
  input  fpreg_t      ra,
  input  fpreg_t      rb,
  input  logic [63:0] fpsw_in,
  output fpreg_t      dest,
  output logic [3:0]  dest_addr,
  output logic        dest_we,
  output logic        fpsw_we,
  output logic [63:0] fpsw_new
);

  // ---------------- latched state ----------------
  logic [3:0]  rs1_q, rs2_q;
  logic [4:0]  rd_q;
  fpreg_t      opa_q, opb_q;
  logic        b_gt_a_q, sub_q, remsign_q;
  logic [64:0] left_q, right_q;
  logic [2:0]  rbits_q;
  logic [17:0] exp_pre_q;
  fpreg_t      dest_q;
  logic        dest_we_q, fpsw_we_q;
  logic [63:0] fpsw_q;

  logic add_cls, cvt, muldiv, xfer, first, final_step;
  always_comb begin
    add_cls = opv[A_ADD] | opv[A_SUB] | opv[A_CMP];
    cvt     = opv[A_CVTD] | opv[A_CVTS];
    muldiv  = opv[A_MUL] | opv[A_DIV];
    xfer    = opv[A_MOV] | opv[A_NEG] | opv[A_ABS];
    first   = (cnt == 5'd2);
    if (opv[A_DIV])      final_step = (cnt == LAST_DIV);
    else if (opv[A_MUL]) final_step = (cnt == LAST_MUL);
    else                 final_step = (cnt == LAST_ADD);
  end

  assign ra_addr = rs1_q;
  assign rb_addr = rs2_q;
  assign reading = first && (opv != '0);

  // ---------------- exponent box ----------------
  logic        b_gt_a, ge128;
  logic [6:0]  shamt;
  logic [17:0] x_left, x_right, x_result;
  logic        x_sub, x_cin, x_ovf, x_unf;
  logic signed [17:0] emax, emin;

  // ---------------- fraction box ----------------
  logic [64:0] f_left, f_right;
  logic [2:0]  f_rbits;
  logic        f_sub, f_cin, f_md, f_force;
  logic [65:0] f_sum;
  logic        f_inter_neg, f_norm_sub, f_zero, f_inexact;
  logic [63:0] f_frac;
  logic [6:0]  f_normdist;

  // ---------------- multiply/divide ----------------
  logic        md_busy, md_done, q_carry, rem_neg, rem_nonzero;
  logic [64:0] mul_hi_s, mul_hi_c, q_pos, q_neg;
  logic [2:0]  mul_rbits, q_rbits;

  // ---------------- sign/type ----------------
  logic        s_sign, s_op_exc, s_fpsw_we, sum_zero;
  logic [4:0]  s_rtype;
  logic [63:0] s_fpsw;

  // alignment shifter
  fpreg_t      greater, lesser;
  logic [6:0]  al_amt;
  logic        al_all;
  logic [194:0] al_wide;
  logic [64:0] al_right;
  logic [2:0]  al_rbits;

  always_comb begin
    // difference section sees the operands being read
    greater = b_gt_a ? rb : ra;
    lesser  = b_gt_a ? ra : rb;
    if (cvt) begin
      lesser = ra;
      al_amt = opv[A_CVTS] ? 7'd40 : 7'd11;
      al_all = 1'b0;
    end else begin
      al_amt = shamt;
      al_all = ge128;
    end
    al_wide = {1'b0, lesser.frac, 130'b0} >> al_amt;
    if (al_all) begin
      al_right = '0;
      al_rbits = {2'b00, |lesser.frac};
    end else begin
      al_right = al_wide[194:130];
      al_rbits = {al_wide[129], al_wide[128], |al_wide[127:0]};
    end

    // exponent ALU: preliminary exponent in the first cycle, adjustment in the last
    x_left = {opa_q.exp[16], opa_q.exp};
    x_right = '0; x_sub = 1'b0; x_cin = 1'b0;
    if (first) begin
      x_left = {ra.exp[16], ra.exp};
      if (muldiv) begin
        x_right = {rb.exp[16], rb.exp};
        x_sub   = opv[A_DIV];
        x_cin   = opv[A_MUL];
      end else begin
        x_right = 18'(al_amt);
      end
    end else begin
      x_left  = exp_pre_q;
      x_right = 18'(f_normdist);
      x_sub   = f_norm_sub;
      x_cin   = f_norm_sub;
    end
    if (opv[A_CVTS]) begin
      emax = 18'(SGL_EMAX); emin = 18'(SGL_EMIN);
    end else if (opv[A_CVTD]) begin
      emax = 18'(DBL_EMAX); emin = 18'(DBL_EMIN);
    end else begin
      emax = 18'(EXT_EMAX); emin = 18'(EXT_EMIN);
    end

    // fraction box input multiplexors
    f_left = left_q; f_right = right_q; f_rbits = rbits_q;
    f_sub = sub_q; f_cin = sub_q; f_md = 1'b0; f_force = cvt;
    if (first && muldiv) begin            // complement of the multiplicand / divisor
      f_left = {1'b0, rb.frac}; f_right = '0; f_rbits = '0;
      f_sub = 1'b1; f_cin = 1'b1;
    end else if (opv[A_MUL]) begin
      f_left = mul_hi_c; f_right = mul_hi_s; f_rbits = mul_rbits;
      f_sub = 1'b0; f_cin = 1'b0; f_md = 1'b1;
    end else if (opv[A_DIV]) begin
      f_left = q_neg; f_right = q_pos; f_rbits = q_rbits;
      f_sub = 1'b1; f_cin = q_carry; f_md = 1'b1;
    end
    sum_zero = ({f_sum, f_rbits} == '0);
  end

  fpu_expbox u_exp (
    .ea(ra.exp), .eb(rb.exp), .b_gt_a(b_gt_a), .shamt(shamt), .ge128(ge128),
    .left(x_left), .right(x_right), .sub(x_sub), .cin(x_cin), .emax(emax), .emin(emin),
    .result(x_result), .ovf(x_ovf), .unf(x_unf)
  );

  fpu_fracbox u_frac (
    .left(f_left), .right(f_right), .rbits(f_rbits), .sub(f_sub), .cin(f_cin), .md(f_md),
    .rm(fpsw_in[FPSW_RM +: 2]), .sign(s_sign), .force_pass(f_force),
    .sum(f_sum), .inter_neg(f_inter_neg), .frac(f_frac), .normdist(f_normdist),
    .norm_sub(f_norm_sub), .zero(f_zero), .inexact(f_inexact)
  );

  fpu_muldiv u_md (
    .clk(clk), .rst_n(rst_n), .load(first && muldiv), .div(opv[A_DIV]),
    .mcd(rb.frac), .neg_mcd(f_sum), .mpr(ra.frac), .remsign(remsign_q),
    .busy(md_busy), .done(md_done),
    .mul_hi_s(mul_hi_s), .mul_hi_c(mul_hi_c), .mul_rbits(mul_rbits),
    .q_pos(q_pos), .q_neg(q_neg), .q_rbits(q_rbits), .q_carry(q_carry),
    .rem_neg(rem_neg), .rem_nonzero(rem_nonzero)
  );

  fpu_signtype u_st (
    .opv(opv), .sa(opa_q.sign), .sb(opb_q.sign), .ta(opa_q.typ), .tb(opb_q.typ),
    .b_gt_a(b_gt_a_q), .inter_neg(f_inter_neg), .sum_zero(sum_zero), .res_zero(f_zero),
    .ovf(x_ovf), .unf(x_unf), .inexact(f_inexact), .rm(fpsw_in[FPSW_RM +: 2]),
    .cmp_mask(rd_q[2:0]), .fpsw_in(fpsw_in),
    .sign(s_sign), .rtype(s_rtype), .op_exc(s_op_exc), .fpsw_we(s_fpsw_we), .fpsw_new(s_fpsw)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs1_q <= '0; rs2_q <= '0; rd_q <= '0;
      opa_q <= '0; opb_q <= '0;
      b_gt_a_q <= 1'b0; sub_q <= 1'b0; remsign_q <= 1'b0;
      left_q <= '0; right_q <= '0; rbits_q <= '0; exp_pre_q <= '0;
      dest_q <= '0; dest_we_q <= 1'b0; fpsw_we_q <= 1'b0; fpsw_q <= '0;
    end else begin
      if (start) begin
        rs1_q <= rs1; rs2_q <= rs2; rd_q <= rd;
        dest_we_q <= 1'b0; fpsw_we_q <= 1'b0;
      end
      if (first) begin
        opa_q    <= ra;
        opb_q    <= rb;
        b_gt_a_q <= b_gt_a && add_cls;
        sub_q    <= add_cls && (ra.sign ^ rb.sign ^ (opv[A_SUB] | opv[A_CMP]));
        left_q   <= (add_cls) ? {1'b0, greater.frac} : '0;
        right_q  <= al_right;
        rbits_q  <= al_rbits;
        exp_pre_q <= add_cls ? {greater.exp[16], greater.exp} : x_result;
      end
      if (opv[A_DIV] && cnt == LAST_DIV - 5'd1) remsign_q <= rem_neg;
      if (final_step && !first && opv != '0) begin
        if (xfer) begin
          dest_q      <= opa_q;
          dest_q.sign <= s_sign;
          dest_we_q   <= 1'b1;
          fpsw_we_q   <= 1'b0;
        end else begin
          dest_q.sign <= s_sign;
          dest_q.exp  <= f_zero ? EZERO : x_result[16:0];
          dest_q.typ  <= s_rtype;
          dest_q.frac <= f_frac;
          dest_we_q   <= !s_op_exc && !opv[A_CMP];
          fpsw_we_q   <= s_fpsw_we;
          fpsw_q      <= s_fpsw;
        end
      end
    end
  end

  assign dest      = dest_q;
  assign dest_addr = rd_q[3:0];
  assign dest_we   = dest_we_q;
  assign fpsw_we   = fpsw_we_q;
  assign fpsw_new  = fpsw_q;

endmodule
