// fpu_muldiv -- shared multiply/divide accumulator loop.
//
// Multiply uses radix-4 Booth recoding, eight multiplier bits per loop: a byte of the
// multiplier plus the top bit of the previous byte forms four overlapping 3-bit groups, each
// recoded one-hot to select +M, +2M, -M or -2M (or nothing). The four selected multiples,
// shifted two places apart, and the two carry-save vectors of the previous loop go through a
// tree of four carry-save adder rows arranged as two groups of three, so the critical path
// holds three adders. After each loop the pair moves right eight places; the eight bits that
// leave each vector are summed by a rounding adder, whose carry out is carried into the next
// loop's rounding addition and whose result from the loop before is ORed into a sticky bit.
// Nine loops (the document's 8.5, the last finishing the top multiplier bit) cover a 64-bit
// multiplier; the last loop does not shift, and its pending rounding carry enters the free
// bottom bit of the carry vector. The fraction box then gets the pair moved up one place with
// the top bit of the last rounding byte appended (product bits 127:63), the next byte bit as
// guard, a zero round bit, and the remaining six bits ORed with the sticky bit.
//
// Divide reuses the same selection and carry-save path with a single multiple per loop. It
// is an SRT radix-4 division with quotient digits -2..2: the top eight bits of the two
// partial remainder vectors are added, and the sum together with the top four divisor bits
// selects the next digit; the selected multiple of the divisor (or of its complement) is
// added to the remainder, which is then shifted left two places. Positive and negative digits
// are shifted into two separate 68-bit quotient vectors. 34 loops give 65 quotient bits plus
// three rounding bits. At the end the three low bits of the two vectors are subtracted, with
// the complement of the final remainder sign as carry input; the carry out and the two high
// 65-bit parts go to the fraction box for the final subtraction.
//
// Interface: `load` (one cycle) latches the multiplicand/divisor, its two's complement (made
// in the fraction box), the multiplier/dividend and the mode. From the next cycle the loop
// runs two iterations per clock (the document allows two clock phases per loop, four phases
// per machine cycle) until `done`. So a multiply takes 5 cycles after the load and a divide 17.
// The outputs are combinational from the final vectors.
//
// From the document: Booth recoding of a byte into four one-hot groups, the tree shape, 8.5
// multiply loops, the eight-place shift with the rounding adder and sticky OR and the
// mapping of its bits onto L, G, R and S, the eight-bit estimate adder, the four divisor bits, digits -2..2 kept as
// positive and negative vectors, 34 loops, the 3-bit subtractor and its carry chain. This
// design's choices: the accumulator window is 128 bits wide, so that the two's complement
// multiples stay exact without sign-extension constants; the rounding carry feeds the next
// rounding addition rather than the carry vector (same weight), and the finished top sum bit
// of the last rounding byte is placed at L instead of sending the carry out of its bit six to
// the fraction box carry input (same value); the remainder vectors are 69
// bits; the digit estimate uses all eight bits of the estimate adder (four integer, four
// fraction bits), with thresholds computed below; the final remainder sign and a nonzero-remainder
// flag are formed here by a full-width add.
module fpu_muldiv
  import spur_fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic        div,        // 1: divide, 0: multiply (sampled with load)
  input  logic [63:0] mcd,        // multiplicand / divisor fraction
  input  logic [65:0] neg_mcd,    // two's complement of {2'b00, mcd}
  input  logic [63:0] mpr,        // multiplier / dividend fraction
  input  logic        remsign,    // latched sign of the final remainder (divide)
  output logic        busy,
  output logic        done,
  // multiply results
  output logic [64:0] mul_hi_s,
  output logic [64:0] mul_hi_c,
  output logic [2:0]  mul_rbits,
  // divide results
  output logic [64:0] q_pos,
  output logic [64:0] q_neg,
  output logic [2:0]  q_rbits,
  output logic        q_carry,
  output logic        rem_neg,
  output logic        rem_nonzero
);

  localparam int PW = 128;   // multiply accumulator width
  localparam int RW = 69;    // remainder width: sign, 3 integer, 65 fraction bits

  logic          mode_div;
  logic [63:0]   mcd_q;
  logic [65:0]   nmcd_q;
  logic [72:0]   mpr_q;       // {8'b0, multiplier, 1'b0}: byte i uses bits 8i+8..8i
  logic [RW-1:0] prs, prc;
  logic [67:0]   posq, negq;
  logic [5:0]    iter;
  logic [5:0]    n_iters;

  function automatic logic [2*PW-1:0] csa(input logic [PW-1:0] a, input logic [PW-1:0] b,
                                          input logic [PW-1:0] c);
    logic [PW-1:0] s, k;
    s = a ^ b ^ c;
    k = ((a & b) | (a & c) | (b & c)) << 1;
    return {s, k};
  endfunction

  function automatic logic [2*RW-1:0] csar(input logic [RW-1:0] a, input logic [RW-1:0] b,
                                           input logic [RW-1:0] c);
    logic [RW-1:0] s, k;
    s = a ^ b ^ c;
    k = ((a & b) | (a & c) | (b & c)) << 1;
    return {s, k};
  endfunction

  // Booth recoding of one 3-bit group into a one-hot select {+M, +2M, -M, -2M}.
  function automatic logic [3:0] booth(input logic [2:0] t);
    unique case (t)
      3'b001, 3'b010: return 4'b0001;
      3'b011:         return 4'b0010;
      3'b100:         return 4'b1000;
      3'b101, 3'b110: return 4'b0100;
      default:        return 4'b0000;
    endcase
  endfunction

  // One multiply loop: four selected multiples, placed two bits apart at the bottom of the
  // accumulator window, added into the carry-save pair. Except in the last loop the low byte
  // of both vectors is then condensed by the rounding adder (with the carry from the previous
  // loop) and the pair moves down eight places; the byte condensed in the loop before goes
  // into the sticky bit. In the last loop the rounding carry enters the free bottom bit of the
  // carry vector instead.
  typedef struct packed {
    logic [PW-1:0] s;
    logic [PW-1:0] c;
    logic          cy;
    logic          sticky;
    logic [7:0]    rbyte;
  } macc_t;

  function automatic macc_t mul_iter(input macc_t a, input logic [5:0] i);
    logic [8:0]    grp;
    logic [PW-1:0] m1, m2, n1, n2;
    logic [PW-1:0] pp [4];
    logic [3:0]    oh;
    logic [2*PW-1:0] r1, r2, r3, r4;
    logic [8:0]    radd;
    macc_t         o;
    grp = mpr_q[8*i +: 9];
    m1 = PW'(mcd_q);
    m2 = m1 << 1;
    n1 = {{(PW-66){nmcd_q[65]}}, nmcd_q};
    n2 = n1 << 1;
    for (int j = 0; j < 4; j++) begin
      oh = booth(grp[2*j +: 3]);
      pp[j] = ({PW{oh[0]}} & m1) | ({PW{oh[1]}} & m2) | ({PW{oh[2]}} & n1) | ({PW{oh[3]}} & n2);
      pp[j] = pp[j] << (2*j);
    end
    r1 = csa(a.s, a.c, pp[0]);
    r2 = csa(pp[1], pp[2], pp[3]);
    r3 = csa(r1[2*PW-1:PW], r1[PW-1:0], r2[2*PW-1:PW]);
    r4 = csa(r3[2*PW-1:PW], r3[PW-1:0], r2[PW-1:0]);
    o = a;
    if (i < 6'(MUL_ITERS - 1)) begin
      radd     = {1'b0, r4[PW +: 8]} + {1'b0, r4[0 +: 8]} + 9'(a.cy);
      o.s      = r4[2*PW-1:PW] >> 8;
      o.c      = r4[PW-1:0] >> 8;
      o.cy     = radd[8];
      o.sticky = a.sticky | (|a.rbyte);
      o.rbyte  = radd[7:0];
    end else begin
      o.s      = r4[2*PW-1:PW];
      o.c      = r4[PW-1:0] | PW'(a.cy);
      o.cy     = 1'b0;
    end
    return o;
  endfunction

  // Quotient estimate: est is the remainder estimate in 1/16 units (signed), dtop the four
  // leading divisor bits 1.xxx (8..15). Digit k+1 is chosen once est reaches the threshold
  // ceil(16 * (k + 1/3) * (dtop+1)/8) for k >= 0 and ceil(16 * (k + 1/3) * dtop/8) for k < 0,
  // which keeps |remainder| <= 2/3 divisor for every divisor in the dtop interval.
  function automatic logic signed [2:0] qsel(input logic [7:0] est, input logic [3:0] dtop);
    int e, d, t2, t1, t0, tm1;
    e   = int'($signed(est));
    d   = int'(dtop);
    t2  = (8 * (d + 1) + 2) / 3;
    t1  = (2 * (d + 1) + 2) / 3;
    t0  = -((4 * d) / 3);
    tm1 = -((10 * d) / 3);
    if (e >= t2)       return 3'sd2;
    else if (e >= t1)  return 3'sd1;
    else if (e >= t0)  return 3'sd0;
    else if (e >= tm1) return -3'sd1;
    else               return -3'sd2;
  endfunction

  // One divide loop.
  function automatic logic [2*RW+4-1:0] div_iter(input logic [RW-1:0] s, input logic [RW-1:0] c);
    logic [7:0] est;
    logic signed [2:0] q;
    logic [RW-1:0] d1, d2, n1, n2, m;
    logic [2*RW-1:0] r;
    est = s[RW-1 -: 8] + c[RW-1 -: 8];
    q   = qsel(est, mcd_q[63:60]);
    d1  = {3'b000, mcd_q, 2'b00};
    d2  = d1 << 1;
    n1  = {{(RW-66){nmcd_q[65]}}, nmcd_q} << 2;
    n2  = n1 << 1;
    unique case (q)
      3'sd2:   m = n2;
      3'sd1:   m = n1;
      -3'sd1:  m = d1;
      -3'sd2:  m = d2;
      default: m = '0;
    endcase
    r = csar(s, c, m);
    return {r[2*RW-1:RW] << 2, r[RW-1:0] << 2,
            (q > 0) ? 2'(q) : 2'b00, (q < 0) ? 2'(-q) : 2'b00};
  endfunction

  macc_t             macc, m_a, m_b;
  logic [2*RW+3:0]   d_a, d_b;
  logic              two;

  always_comb begin
    m_a = mul_iter(macc, iter);
    m_b = mul_iter(m_a, iter + 6'd1);
    d_a = div_iter(prs, prc);
    d_b = div_iter(d_a[2*RW+3 -: RW], d_a[RW+3 -: RW]);
    two = (iter + 6'd2) <= n_iters;
  end

  assign n_iters = mode_div ? 6'(DIV_ITERS) : 6'(MUL_ITERS);
  assign busy    = (iter < n_iters);
  assign done    = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_div <= 1'b0;
      mcd_q    <= '0;
      nmcd_q   <= '0;
      mpr_q    <= '0;
      macc     <= '0;
      prs      <= '0;
      prc      <= '0;
      posq     <= '0;
      negq     <= '0;
      iter     <= 6'(DIV_ITERS);
    end else if (load) begin
      mode_div <= div;
      mcd_q    <= mcd;
      nmcd_q   <= neg_mcd;
      mpr_q    <= {8'b0, mpr, 1'b0};
      macc     <= '0;
      prs      <= {3'b000, mpr, 2'b00};
      prc      <= '0;
      posq     <= '0;
      negq     <= '0;
      iter     <= '0;
    end else if (busy) begin
      if (mode_div) begin
        if (two) begin
          prs  <= d_b[2*RW+3 -: RW];
          prc  <= d_b[RW+3 -: RW];
          posq <= {posq[63:0], d_a[3:2], d_b[3:2]};
          negq <= {negq[63:0], d_a[1:0], d_b[1:0]};
          iter <= iter + 6'd2;
        end else begin
          prs  <= d_a[2*RW+3 -: RW];
          prc  <= d_a[RW+3 -: RW];
          posq <= {posq[65:0], d_a[3:2]};
          negq <= {negq[65:0], d_a[1:0]};
          iter <= iter + 6'd1;
        end
      end else begin
        if (two) begin
          macc  <= m_b;
          iter  <= iter + 6'd2;
        end else begin
          macc  <= m_a;
          iter  <= iter + 6'd1;
        end
      end
    end
  end

  // Final multiply outputs: the window now sits at product bit 64. Moving it up one place
  // and appending the top bit of the last rounding byte gives product bits 127:63; the next
  // byte bit is the guard bit, the round bit is zero and the remaining six bits join the
  // sticky bit.
  logic [RW-1:0] rem;
  logic [3:0] q3;
  always_comb begin
    mul_hi_s  = {macc.s[63:0], macc.rbyte[7]};
    mul_hi_c  = {macc.c[63:0], 1'b0};
    mul_rbits = {macc.rbyte[6], 1'b0, macc.sticky | (|macc.rbyte[5:0])};

    rem         = prs + prc;
    rem_neg     = rem[RW-1];
    rem_nonzero = (rem != '0);
    q3          = {1'b0, posq[2:0]} + {1'b0, ~negq[2:0]} + 4'(!remsign);
    q_rbits     = {q3[2:1], q3[0] | rem_nonzero};
    q_carry     = q3[3];
    q_pos       = posq[67:3];
    q_neg       = negq[67:3];
  end

endmodule
