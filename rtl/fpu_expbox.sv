// fpu_expbox -- exponent datapath: difference section and result section.
//
// Exponents are 17-bit two's complement numbers with a bias of -1; every element here is 18
// bits wide so that no intermediate value overflows. The difference section runs two
// subtractors in parallel (A-B and B-A), tells which operand has the greater exponent
// (b_gt_a) and gives the positive difference as a 7-bit shift amount plus a flag for
// differences of 128 or more. The result section is one adder/subtractor: left +/- right
// plus a carry input, the carry input being how the datapath keeps the bias right (an add of
// two biased exponents needs +1, a subtract of them a carry of 0 instead of 1). The result is
// then compared against the exponent range of the destination format to raise overflow or
// underflow.
//
// The two parallel subtractors, the 7-bit shift amount with its >=128 flag, the 18-bit width,
// the bias of -1 and bias correction through the carry input follow the document. Checking
// the range against limits given per instruction (extended, double or single) is this
// design's choice. Purely combinational.
module fpu_expbox
  import spur_fpu_pkg::*;
(
  // difference section
  input  logic [16:0] ea,
  input  logic [16:0] eb,
  output logic        b_gt_a,     // exponent of B is the greater
  output logic [6:0]  shamt,      // |ea - eb|, valid when ge128 = 0
  output logic        ge128,      // |ea - eb| >= 128
  // result section
  input  logic [17:0] left,
  input  logic [17:0] right,
  input  logic        sub,        // 1: left + ~right + cin, 0: left + right + cin
  input  logic        cin,
  input  logic signed [17:0] emax,   // largest internal exponent of the destination format
  input  logic signed [17:0] emin,   // smallest internal exponent of the destination format
  output logic [17:0] result,
  output logic        ovf,
  output logic        unf
);

  logic signed [17:0] d_ab, d_ba, pos;

  always_comb begin
    d_ab   = $signed({ea[16], ea}) - $signed({eb[16], eb});
    d_ba   = $signed({eb[16], eb}) - $signed({ea[16], ea});
    b_gt_a = d_ab[17];
    pos    = b_gt_a ? d_ba : d_ab;
    ge128  = (pos > 18'sd127);
    shamt  = pos[6:0];

    result = left + (sub ? ~right : right) + 18'(cin);
    ovf    = $signed(result) > emax;
    unf    = $signed(result) < emin;
  end

endmodule
