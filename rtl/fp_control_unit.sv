// fp_control_unit: control unit of the floating-point multiplier.
//
// It classifies both operands (NaN, infinity, zero; denormals go through the
// datapath) and overrides the datapath result for the special cases:
//   - a NaN operand, or zero times infinity, gives the quiet NaN (exponent all
//     ones, top fraction bit set: 7FC00000 in binary32); zero times infinity
//     also raises invalid;
//   - infinity times a non-zero number gives an infinity;
//   - zero times a finite number gives a zero, i.e. an exponent field of 0;
// the sign of infinities and zeros comes from the sign unit, so the operand
// sign bits themselves are not read here. Otherwise the
// rounded datapath result and its flags (overflow among them) pass on.
// It also reports what class the final result is in: is_nan, is_inf, is_zero.
//
// The unit and its concern for zeros and NaNs are published; the override
// rules are taken from IEEE 754.
// Interface: the two operands, the sign from the sign unit and the datapath
// result and flags in; the final result, flags and class out. The format is
// EXP_W exponent and FRAC_W fraction bits, binary32 by default.
// Timing: combinational.
module fp_control_unit
  import fp_pkg::*;
#(
  parameter int unsigned EXP_W  = 8,
  parameter int unsigned FRAC_W = 23
) (
  input  logic [EXP_W+FRAC_W:0] a,
  input  logic [EXP_W+FRAC_W:0] b,
  input  logic                  sign_z,
  input  logic [EXP_W+FRAC_W:0] dp_z,
  input  fp_flags_t             dp_flags,
  output logic [EXP_W+FRAC_W:0] z,
  output fp_flags_t             flags,
  output logic                  is_nan,
  output logic                  is_inf,
  output logic                  is_zero
);
  localparam int unsigned W = EXP_W + FRAC_W + 1;
  localparam logic [W-1:0] NAN = {1'b0, {EXP_W{1'b1}}, 1'b1, {(FRAC_W-1){1'b0}}};

  logic [EXP_W-1:0]  ea, eb, ez;
  logic [FRAC_W-1:0] fa, fb, fz;
  logic a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;

  always_comb begin
    {ea, fa} = a[W-2:0];
    {eb, fb} = b[W-2:0];
    a_nan  = (&ea) && (fa != '0);
    b_nan  = (&eb) && (fb != '0);
    a_inf  = (&ea) && (fa == '0);
    b_inf  = (&eb) && (fb == '0);
    a_zero = (a[W-2:0] == '0);
    b_zero = (b[W-2:0] == '0);

    flags = '0;
    if (a_nan || b_nan) begin
      z = NAN;
    end else if ((a_inf && b_zero) || (a_zero && b_inf)) begin
      z             = NAN;
      flags.invalid = 1'b1;
    end else if (a_inf || b_inf) begin
      z = {sign_z, {EXP_W{1'b1}}, {FRAC_W{1'b0}}};
    end else if (a_zero || b_zero) begin
      z = {sign_z, {(W-1){1'b0}}};
    end else begin
      z     = dp_z;
      flags = dp_flags;
    end

    {ez, fz} = z[W-2:0];
    is_nan  = (&ez) && (fz != '0);
    is_inf  = (&ez) && (fz == '0);
    is_zero = (z[W-2:0] == '0);
  end
endmodule
