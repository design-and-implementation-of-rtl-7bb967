// fp_exponent_unit: exponent calculation unit of the floating-point multiplier.
//
// The two biased exponents are added and one bias is taken away, so the sum
// is again biased. The bias is 2^(EXP_W-1) - 1 (127 for the default binary32
// format). An exponent field of 0 (zero or denormal operand) stands for the
// same scale as a field of 1, because a denormal has no hidden bit; the unit
// therefore uses 1 in its place. The result is a signed number of EXP_W+3
// bits: it can exceed the largest field (overflow) or fall to 0 and below
// (underflow), and the later stages decide what to do with it.
//
// Interface: exp_a, exp_b (EXP_W-bit biased fields) in; exp_z (signed, biased)
// out, the exponent of the product of the significands read as 1.f x 1.f.
// The published algorithm writes the sum without the bias correction; its own
// simulation values include it, and so does this unit. The width is this
// design's choice.
// Timing: combinational.
module fp_exponent_unit #(
  parameter int unsigned EXP_W = 8
) (
  input  logic [EXP_W-1:0]        exp_a,
  input  logic [EXP_W-1:0]        exp_b,
  output logic signed [EXP_W+2:0] exp_z
);
  localparam int unsigned XW   = EXP_W + 3;
  localparam int unsigned BIAS = 2**(EXP_W-1) - 1;

  logic signed [XW-1:0] ea, eb;

  always_comb begin
    ea    = (exp_a == '0) ? XW'(1) : $signed(XW'(exp_a));
    eb    = (exp_b == '0) ? XW'(1) : $signed(XW'(exp_b));
    exp_z = ea + eb - $signed(XW'(BIAS));
  end
endmodule
