// fp_round_pack: rounding and assembly of an IEEE-754 style result.
//
// The format has EXP_W exponent and FRAC_W fraction bits (binary32 by
// default). Input is a normalised significand of FRAC_W+4 bits (hidden bit on
// top, then the fraction, guard, round and sticky) with a signed biased
// exponent. When the exponent is 0 or below, the value is below the normal
// range: the significand is shifted right by 1 - exp (the shifted-out bits
// are kept in the sticky bit) and the result is encoded as a denormal. The
// FRAC_W+1 kept bits are then rounded by the selected mode: to nearest even,
// up, down or toward zero. The rounded significand is added to (exponent - 1)
// placed in the exponent field, so a carry out of the significand (1.11..1
// rounding to 10.0, or the largest denormal rounding to the smallest normal)
// increments the exponent on its own. A final exponent field of all ones or
// more is an overflow: infinity, or the largest finite number when the
// rounding mode points toward zero.
//
// The four rounding modes, the overflow indicator and dropping the hidden bit
// are published; the mode encoding, gradual underflow and the flag rules
// follow IEEE 754 and are this design's choices.
// Interface: sign, exp_in, sig_in, zero (exact zero), rm in; z and flags out.
// underflow is raised when the result is tiny before rounding and inexact;
// invalid is never raised here (it belongs to the special-case logic that
// follows). An exact zero gives a zero of the given sign.
// Timing: combinational.
module fp_round_pack
  import fp_pkg::*;
#(
  parameter int unsigned EXP_W  = 8,
  parameter int unsigned FRAC_W = 23
) (
  input  logic                    sign,
  input  logic signed [EXP_W+2:0] exp_in,
  input  logic [FRAC_W+3:0]       sig_in,
  input  logic                    zero,
  input  round_mode_t             rm,
  output logic [EXP_W+FRAC_W:0]   z,
  output fp_flags_t               flags
);
  localparam int unsigned XW = EXP_W + 3;
  localparam int unsigned NW = FRAC_W + 4;
  localparam int unsigned PW = XW + FRAC_W;

  logic [NW-1:0] sig_d, lost;
  logic [XW-1:0] exp_pre, shamt;
  logic          tiny;
  logic          lsb, guard, rest, inc;
  logic [FRAC_W+1:0] mant;
  logic [PW-1:0] packed_w;
  logic          ovf;
  logic          to_inf;

  always_comb begin
    // Denormalisation of tiny results.
    tiny  = (exp_in <= 0);
    shamt = XW'(XW'(1) - exp_in);
    lost  = sig_in & ((NW'(1) << shamt) - NW'(1));
    if (tiny) begin
      exp_pre = '0;
      if (shamt >= XW'(NW)) sig_d = NW'(|sig_in);
      else                  sig_d = (sig_in >> shamt) | NW'(|lost);
    end else begin
      exp_pre = XW'(exp_in - XW'(1));
      sig_d   = sig_in;
    end

    lsb   = sig_d[3];
    guard = sig_d[2];
    rest  = |sig_d[1:0];
    unique case (rm)
      RM_RNE:  inc = guard & (rest | lsb);
      RM_RUP:  inc = ~sign & (guard | rest);
      RM_RDN:  inc =  sign & (guard | rest);
      default: inc = 1'b0;
    endcase

    mant     = {1'b0, sig_d[NW-1:3]} + (FRAC_W+2)'(inc);
    packed_w = (PW'(exp_pre) << FRAC_W) + PW'(mant);   // exponent field at bit FRAC_W
    ovf      = (packed_w[PW-1:FRAC_W] >= XW'(2**EXP_W - 1));
    to_inf   = (rm == RM_RNE) || (rm == RM_RUP && !sign) || (rm == RM_RDN && sign);

    flags.invalid   = 1'b0;
    flags.inexact   = guard | rest | ovf;
    flags.overflow  = ovf;
    flags.underflow = tiny & (guard | rest);

    if (zero) begin
      z     = {sign, {(EXP_W+FRAC_W){1'b0}}};
      flags = '0;
    end else if (ovf) begin
      z = to_inf ? {sign, {EXP_W{1'b1}}, {FRAC_W{1'b0}}}
                 : {sign, {(EXP_W-1){1'b1}}, 1'b0, {FRAC_W{1'b1}}};
    end else begin
      z = {sign, packed_w[EXP_W+FRAC_W-1:0]};
    end
  end
endmodule
