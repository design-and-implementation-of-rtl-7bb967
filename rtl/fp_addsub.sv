// fp_addsub: IEEE-754 single-precision adder/subtractor.
//
// It forms a + b, or a - b when sub is 1, and combines the four products of
// the complex multiplier. The text only names this addition and subtraction,
// so the structure is a plain one of this design's choosing: the operand of
// larger magnitude is kept, the other significand is shifted right by the
// exponent difference into a 27-bit field (24 bits plus guard, round and a
// sticky bit collecting everything shifted out), the two are added or
// subtracted, fp_normalizer brings the leading one back to the front and
// fp_round_pack rounds in the selected mode and packs the word. Special cases:
// a NaN operand gives the quiet NaN; inf - inf gives the quiet NaN and raises
// invalid; an infinity otherwise wins; an exact zero sum is +0, or -0 when
// rounding down, and two zeros of the same sign keep that sign.
//
// Interface: in_valid, a, b, sub, rm in; out_valid, z, flags out.
// Timing: combinational datapath with one output register, so a result leaves
// one clock after its operands, one per clock. rst_n is an active-low
// asynchronous reset.
module fp_addsub
  import fp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  input  round_mode_t rm,
  output logic        out_valid,
  output logic [31:0] z,
  output fp_flags_t   flags
);
  logic        sa, sb;
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic        a_nan, b_nan, a_inf, b_inf;
  logic        swap;
  logic        sl, ss;
  logic [7:0]  el, es, el_eff, es_eff, d;
  logic [23:0] ml, ms;
  logic [26:0] ms_ext, ms_lost, ms_al;
  logic [27:0] sum;
  logic        eff_sub;

  logic [26:0]       sig_n;
  logic signed [10:0] exp_n;
  logic              zero_n;
  logic              sign_r;
  logic [31:0]       rp_z, z_c;
  fp_flags_t         rp_flags, flags_c;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23]; fa = a[22:0];
    eb = b[30:23]; fb = b[22:0];
    a_nan = (ea == 8'hFF) && (fa != '0);
    b_nan = (eb == 8'hFF) && (fb != '0);
    a_inf = (ea == 8'hFF) && (fa == '0);
    b_inf = (eb == 8'hFF) && (fb == '0);

    // Larger magnitude first.
    swap = (b[30:0] > a[30:0]);
    sl = swap ? sb : sa;   ss = swap ? sa : sb;
    el = swap ? eb : ea;   es = swap ? ea : eb;
    ml = swap ? {eb != '0, fb} : {ea != '0, fa};
    ms = swap ? {ea != '0, fa} : {eb != '0, fb};
    el_eff = (el == '0) ? 8'd1 : el;
    es_eff = (es == '0) ? 8'd1 : es;
    d      = el_eff - es_eff;

    // Alignment of the smaller operand, with a sticky bit.
    ms_ext  = {ms, 3'b000};
    ms_lost = ms_ext & ((27'd1 << d) - 27'd1);
    if (d >= 8'd27) ms_al = {26'b0, |ms};
    else            ms_al = (ms_ext >> d) | {26'b0, |ms_lost};

    eff_sub = sl ^ ss;
    sum     = eff_sub ? ({1'b0, ml, 3'b000} - {1'b0, ms_al})
                      : ({1'b0, ml, 3'b000} + {1'b0, ms_al});

    // Sign of an exact zero: the common sign, else +0 (-0 when rounding down).
    sign_r = (sum == '0) ? ((sa == sb) ? sa : (rm == RM_RDN)) : sl;
  end

  fp_normalizer #(.IN_W(28), .OUT_W(27), .XW(11)) u_norm (
    .sig(sum), .exp_in($signed({3'b000, el_eff})),
    .sig_n(sig_n), .exp_n(exp_n), .zero(zero_n)
  );

  fp_round_pack u_round (
    .sign(sign_r), .exp_in(exp_n), .sig_in(sig_n), .zero(zero_n), .rm(rm),
    .z(rp_z), .flags(rp_flags)
  );

  always_comb begin
    flags_c = '0;
    if (a_nan || b_nan) begin
      z_c = QNAN;
    end else if (a_inf && b_inf && (sa != sb)) begin
      z_c             = QNAN;
      flags_c.invalid = 1'b1;
    end else if (a_inf) begin
      z_c = {sa, 8'hFF, 23'b0};
    end else if (b_inf) begin
      z_c = {sb, 8'hFF, 23'b0};
    end else begin
      z_c     = rp_z;
      flags_c = rp_flags;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      z         <= '0;
      flags     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        z     <= z_c;
        flags <= flags_c;
      end
    end
  end
endmodule
