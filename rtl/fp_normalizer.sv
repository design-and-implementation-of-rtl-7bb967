// fp_normalizer: moves the leading one of a significand to the front.
//
// The input sig has IN_W bits; its top bit has the weight of one place above
// the hidden bit at exponent exp_in. A leading-zero count lz selects the
// shift: the value is shifted left by lz and the exponent becomes
// exp_in + 1 - lz, so a product of two normal significands (in [1,4)) moves
// right by one place or stays, and a product with a denormal operand is
// shifted left as far as needed. The result has OUT_W bits: the hidden bit on
// top, the fraction, guard and round bits, and a sticky bit (bit 0) that is
// the OR of every bit below the round bit. For binary32, OUT_W = 27.
//
// Normalising the product is a published step; the leading-zero count and
// the guard/round/sticky layout are this design's.
// Interface: sig, exp_in in; sig_n, exp_n, zero (sig was all zeros) out.
// XW is the width of the signed exponents. Timing: combinational.
module fp_normalizer #(
  parameter int unsigned IN_W  = 48,
  parameter int unsigned OUT_W = 27,
  parameter int unsigned XW    = 11
) (
  input  logic [IN_W-1:0]      sig,
  input  logic signed [XW-1:0] exp_in,
  output logic [OUT_W-1:0]     sig_n,
  output logic signed [XW-1:0] exp_n,
  output logic                 zero
);
  localparam int unsigned LZW = $clog2(IN_W + 1);

  logic [LZW-1:0]  lz;
  logic [IN_W-1:0] shifted;

  // Leading-zero count: position of the most significant one.
  always_comb begin
    lz = LZW'(IN_W);
    for (int i = 0; i < IN_W; i++)
      if (sig[i]) lz = LZW'(IN_W - 1 - i);
  end

  always_comb begin
    shifted = sig << lz;
    sig_n   = {shifted[IN_W-1 -: OUT_W-1], |shifted[IN_W-OUT_W:0]};
    exp_n   = exp_in + XW'(1) - $signed(XW'(lz));
    zero    = (sig == '0);
  end
endmodule
