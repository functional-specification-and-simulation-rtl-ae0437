// fpu_roundnorm -- rounding and normalization stage of the fraction box.
//
// Input is the 68-bit output of the fraction adder after the exclusive-OR with the
// intermediate sign: two integer bits (67:66), 63 fraction bits (65:3) and the guard, round
// and sticky bits (2:0). When the sum was negative (cmpl) this is the ones' complement of the
// magnitude, and one must still be added at the sticky position to finish the negation. The
// block first classifies the value by the normalizing shift it needs: right by one (R1, bit
// 67 set), none (Pass, bit 66), left by one (L1, bit 65) or left by more than one (GT1).
// R1, Pass and L1 values are pre-shifted at once; their upper 63 bits go to the incrementer
// and their L, G, R and S bits to the rounding table. The table first adds the complement
// increment (at S for Pass; at R for L1, whose S position was shifted up; R1 never comes
// from a negative sum), then makes the rounding decision on the new L, G, R and S bits, and
// returns the new L bit and the single increment for the upper 63 bits: the upper bits are
// never incremented for both reasons. GT1 values are exact; they go unshifted through the
// same incrementer, for the complement increment only, and on to the priority encoder. A
// carry out of the incrementer on the rounded path is ORed into the top bit and counted in
// the exponent adjustment. A final priority-encoded left shift (0..66 places) produces the
// normalized result and the zero-detect signal. The exponent adjustment leaves as a 7-bit
// magnitude plus an add/subtract flag. Converts force the Pass path, so that the operand
// pre-shifted by the alignment shifter is rounded at the single or double LSB and then
// renormalized by the encoder.
//
// The classification, the one incrementer shared by rounding and complementation, the
// L/G/R/S rounding table that knows the intermediate sign, the carry-into-MSB trick and the
// 7-bit distance plus direction flag follow the document. Where exactly the complement
// increment enters for each class, and forcing the Pass path for converts, are this design's
// reading. Purely combinational.
module fpu_roundnorm
  import spur_fpu_pkg::*;
(
  input  logic [67:0] mag,         // [67:66] integer, [65:3] fraction, [2:0] GRS
  input  logic        cmpl,        // mag is a ones' complement: add one at the sticky position
  input  logic [1:0]  rm,          // rounding mode
  input  logic        sign,        // sign of the final result (for directed rounding)
  input  logic        force_pass,  // convert: round at bit 3 whatever the leading-one position
  output logic [63:0] frac,        // normalized fraction, integer bit at 63
  output logic [6:0]  normdist,    // magnitude of the exponent adjustment
  output logic        norm_sub,    // 1: subtract normdist from the exponent, 0: add it
  output logic        zero,        // result is zero
  output logic        inexact      // rounding discarded nonzero bits
);

  logic r1, pass, l1, gt1, rnd_path;
  logic [63:0] mant;
  logic g, r, s, inc;
  logic [3:0]  low;         // L, G, R, S into the rounding table
  logic [1:0]  cadd;        // complement increment at the L/G/R/S scale
  logic [4:0]  t;           // low bits after the complement increment
  logic [1:0]  u;           // new L bit plus the increment of the upper bits (at most 3)
  logic [62:0] upper;       // incrementer input
  logic [63:0] incd;
  logic [63:0] rounded;
  logic [66:0] pre;
  logic [6:0]  lz;
  logic [66:0] shifted;
  logic signed [8:0] adj;

  always_comb begin
    r1   = mag[67];
    pass = !mag[67] && mag[66];
    l1   = !mag[67] && !mag[66] && mag[65];
    gt1  = !(r1 || pass || l1);
    rnd_path = force_pass || !gt1;

    // Pre-normalizing shift for the values that are rounded.
    if (r1 && !force_pass) begin
      mant = mag[67:4]; g = mag[3]; r = mag[2]; s = mag[1] | mag[0];
    end else if (l1 && !force_pass) begin
      mant = mag[65:2]; g = mag[1]; r = mag[0]; s = 1'b0;
    end else begin
      mant = mag[66:3]; g = mag[2]; r = mag[1]; s = mag[0];
    end

    // Rounding table: complement increment first, then the rounding decision.
    if (rnd_path) begin
      upper = mant[63:1];
      low   = {mant[0], g, r, s};
    end else begin
      upper = mag[66:4];
      low   = mag[3:0];
    end
    cadd = !cmpl ? 2'd0 : (rnd_path && l1 && !force_pass) ? 2'd2 : 2'd1;
    t    = {1'b0, low} + {3'b000, cadd};
    unique case (rm)
      RM_NEAREST: inc = t[2] && (t[1] || t[0] || t[3]);
      RM_ZERO:    inc = 1'b0;
      RM_PINF:    inc = !sign && (|t[2:0]);
      default:    inc = sign && (|t[2:0]);
    endcase
    if (!rnd_path) inc = 1'b0;
    u = t[4:3] + {1'b0, inc};

    // The one incrementer.
    incd    = {1'b0, upper} + 64'(u[1]);
    rounded = {incd[62:0], u[0]};
    rounded[63] = incd[62] | incd[63];          // incrementer overflow ORed into the MSB
    inexact = rnd_path && (|t[2:0]);

    pre = rnd_path ? {rounded, 3'b000} : {incd[62:0], t[3:0]};

    // Priority encoder: leading zeros of the 67-bit value.
    lz = 7'd67;
    for (int i = 0; i <= 66; i++) begin
      if (pre[i]) lz = 7'(66 - i);
    end
    zero    = (pre == '0);
    shifted = zero ? '0 : (pre << lz);
    frac    = shifted[66:3];

    // Exponent adjustment: initial shift, incrementer overflow, encoder distance.
    adj = 9'sd0;
    if (!force_pass) begin
      if (r1)      adj = 9'sd1;
      else if (l1) adj = -9'sd1;
    end
    if (rnd_path && incd[63]) adj = adj + 9'sd1;
    if (!zero) adj = adj - $signed({2'b00, lz});
    norm_sub = adj[8];
    normdist = adj[8] ? 7'(-adj) : adj[6:0];
  end

endmodule
