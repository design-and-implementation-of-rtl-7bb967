// signed_vedic_mul: two's-complement multiplier built on the unsigned Vedic
// multiplier.
//
// Both operands are converted to magnitude and sign, the magnitudes are
// multiplied by vedic_mul, and the product is negated when the operand signs
// differ. The magnitude of the most negative operand, 2^(WIDTH-1), still fits
// in WIDTH unsigned bits, so every input pair is exact. The sign-magnitude
// wrapping is this design's choice; the text names a signed Vedic multiplier
// without saying how it is built.
//
// Interface: a, b signed WIDTH bits; p = a*b, signed 2*WIDTH bits.
// Timing: purely combinational.
module signed_vedic_mul #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DIGIT = 8
) (
  input  logic signed [WIDTH-1:0]   a,
  input  logic signed [WIDTH-1:0]   b,
  output logic signed [2*WIDTH-1:0] p
);
  logic [WIDTH-1:0]   mag_a, mag_b;
  logic [2*WIDTH-1:0] mag_p;
  logic               neg;

  always_comb begin
    mag_a = a[WIDTH-1] ? WIDTH'(-a) : a;
    mag_b = b[WIDTH-1] ? WIDTH'(-b) : b;
    neg   = a[WIDTH-1] ^ b[WIDTH-1];
  end

  vedic_mul #(.WIDTH(WIDTH), .DIGIT(DIGIT)) u_mag (
    .a(mag_a),
    .b(mag_b),
    .p(mag_p)
  );

  assign p = neg ? -$signed(mag_p) : $signed(mag_p);
endmodule
