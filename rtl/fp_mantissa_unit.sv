// fp_mantissa_unit: mantissa calculation unit of the floating-point multiplier.
//
// The hidden bit of each operand is 1 when its exponent field is non-zero and
// 0 otherwise (a zero or a denormal), giving two (FRAC_W+1)-bit significands.
// They are multiplied by the unsigned Vedic multiplier in words of DIGIT bits.
// For the default binary32 format the significands have 24 bits, three 8-bit
// words per operand, so the crosswise pattern works on words a2 a1 a0 x
// b2 b1 b0 and each word product is itself a bit-level Urdhva multiplier.
// When the significand width is not a multiple of DIGIT (11 bits for
// binary16, say) the significands are zero-extended to the next multiple.
// The 2*(FRAC_W+1)-bit product has its binary point two places below the top,
// so it lies in [1,4) for normal operands.
//
// The hidden-bit rule and the 24x24 Vedic multiplication are published; the
// word size and the zero-extension are this design's choices.
// Interface: exponent fields and fractions of both operands in; prod out.
// Timing: combinational.
module fp_mantissa_unit #(
  parameter int unsigned EXP_W  = 8,
  parameter int unsigned FRAC_W = 23,
  parameter int unsigned DIGIT  = 8
) (
  input  logic [EXP_W-1:0]      exp_a,
  input  logic [FRAC_W-1:0]     frac_a,
  input  logic [EXP_W-1:0]      exp_b,
  input  logic [FRAC_W-1:0]     frac_b,
  output logic [2*FRAC_W+1:0]   prod
);
  localparam int unsigned SIG_W = FRAC_W + 1;
  localparam int unsigned PAD_W = ((SIG_W + DIGIT - 1) / DIGIT) * DIGIT;

  logic [PAD_W-1:0]   sig_a, sig_b;
  logic [2*PAD_W-1:0] prod_w;

  assign sig_a = PAD_W'({exp_a != '0, frac_a});
  assign sig_b = PAD_W'({exp_b != '0, frac_b});

  vedic_mul #(.WIDTH(PAD_W), .DIGIT(DIGIT)) u_vedic (
    .a(sig_a),
    .b(sig_b),
    .p(prod_w)
  );

  // The padding bits are zero, so the product fits in 2*SIG_W bits.
  assign prod = prod_w[2*SIG_W-1:0];
endmodule
