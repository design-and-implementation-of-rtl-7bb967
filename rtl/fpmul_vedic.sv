// fpmul_vedic: IEEE-754 style floating-point multiplier with a Vedic mantissa
// unit. The format has EXP_W exponent and FRAC_W fraction bits: binary32
// (8, 23) by default; binary16 (5, 10) and an 8-bit format (4, 3) are the
// smaller sizes it is tested at.
//
// The product of A = (-1)^sa 1.fa 2^(ea-127) and B likewise is formed by four
// units: the sign unit (sa xor sb), the exponent unit (ea + eb - 127), the
// mantissa unit (24x24 Vedic multiplication of the significands) and the
// control unit (zeros, infinities, NaNs). Between them the 48-bit product is
// normalised (leading one to the front, exponent corrected) and rounded back
// to 24 bits in one of four rounding modes, with gradual underflow to
// denormals and overflow to infinity, then packed into 32 bits without the
// hidden bit. All widths below are for the default binary32 format.
//
// The four units and the algorithm follow the published design; the
// pipeline, handshake and rounding-mode input are this design's.
//
// Pipeline (this design's choice): stage 1 runs the sign, exponent and
// mantissa units and registers their results with the operands; stage 2
// normalises, rounds and applies the control unit, and registers the result.
// A result leaves two clocks after its operands enter, one result per clock;
// out_valid follows in_valid. rst_n is an active-low asynchronous reset of the
// valid bits. rm is sampled with the operands.
//
// Interface: in_valid, a, b, rm in; out_valid, z, flags, is_nan, is_inf,
// is_zero out.
module fpmul_vedic
  import fp_pkg::*;
#(
  parameter int unsigned EXP_W  = 8,
  parameter int unsigned FRAC_W = 23
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [EXP_W+FRAC_W:0] a,
  input  logic [EXP_W+FRAC_W:0] b,
  input  round_mode_t           rm,
  output logic                  out_valid,
  output logic [EXP_W+FRAC_W:0] z,
  output fp_flags_t             flags,
  output logic                  is_nan,
  output logic                  is_inf,
  output logic                  is_zero
);
  localparam int unsigned W  = EXP_W + FRAC_W + 1;
  localparam int unsigned XW = EXP_W + 3;          // signed internal exponent
  localparam int unsigned PW = 2 * (FRAC_W + 1);   // significand product
  localparam int unsigned NW = FRAC_W + 4;         // normalised significand

  // ---- stage 1: sign, exponent and mantissa units ----
  logic                 sign_c;
  logic signed [XW-1:0] exp_c;
  logic [PW-1:0]        prod_c;

  fp_sign_unit u_sign (.sign_a(a[W-1]), .sign_b(b[W-1]), .sign_z(sign_c));

  fp_exponent_unit #(.EXP_W(EXP_W)) u_exp (
    .exp_a(a[W-2:FRAC_W]), .exp_b(b[W-2:FRAC_W]), .exp_z(exp_c)
  );

  fp_mantissa_unit #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_mant (
    .exp_a(a[W-2:FRAC_W]), .frac_a(a[FRAC_W-1:0]),
    .exp_b(b[W-2:FRAC_W]), .frac_b(b[FRAC_W-1:0]),
    .prod(prod_c)
  );

  logic                 s1_valid;
  logic                 s1_sign;
  logic signed [XW-1:0] s1_exp;
  logic [PW-1:0]        s1_prod;
  logic [W-1:0]         s1_a, s1_b;
  round_mode_t          s1_rm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      s1_sign <= sign_c;
      s1_exp  <= exp_c;
      s1_prod <= prod_c;
      s1_a    <= a;
      s1_b    <= b;
      s1_rm   <= rm;
    end
  end

  // ---- stage 2: normalise, round, control ----
  logic [NW-1:0]        sig_n;
  logic signed [XW-1:0] exp_n;
  logic                 zero_n;
  logic [W-1:0]         dp_z, ctl_z;
  fp_flags_t            dp_flags, ctl_flags;
  logic                 ctl_nan, ctl_inf, ctl_zero;

  fp_normalizer #(.IN_W(PW), .OUT_W(NW), .XW(XW)) u_norm (
    .sig(s1_prod), .exp_in(s1_exp),
    .sig_n(sig_n), .exp_n(exp_n), .zero(zero_n)
  );

  fp_round_pack #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_round (
    .sign(s1_sign), .exp_in(exp_n), .sig_in(sig_n), .zero(zero_n), .rm(s1_rm),
    .z(dp_z), .flags(dp_flags)
  );

  fp_control_unit #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_ctl (
    .a(s1_a), .b(s1_b), .sign_z(s1_sign), .dp_z(dp_z), .dp_flags(dp_flags),
    .z(ctl_z), .flags(ctl_flags), .is_nan(ctl_nan), .is_inf(ctl_inf), .is_zero(ctl_zero)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s1_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z       <= '0;
      flags   <= '0;
      is_nan  <= 1'b0;
      is_inf  <= 1'b0;
      is_zero <= 1'b0;
    end else if (s1_valid) begin
      z       <= ctl_z;
      flags   <= ctl_flags;
      is_nan  <= ctl_nan;
      is_inf  <= ctl_inf;
      is_zero <= ctl_zero;
    end
  end
endmodule
