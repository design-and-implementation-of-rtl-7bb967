// fp_complex_mult: floating-point complex multiplier.
//
// (a_re + j a_im)(b_re + j b_im) = (a_re b_re - a_im b_im) + j (a_re b_im + a_im b_re)
// with all numbers in IEEE-754 single precision. Four fpmul_vedic multipliers
// form the four real products in parallel; one fp_addsub subtracts for the
// real part and one adds for the imaginary part. Each product and each sum is
// rounded on its own, in the mode rm given with the operands. The four
// multiplications, one subtraction and one addition are the published
// structure; pipelining and flag merging are this design's.
//
// Timing: the multipliers take two clocks and the adders one, so a result
// appears three clocks after its operands; a new operand set may enter every
// clock. out_valid follows in_valid. The flags of each output part are the OR
// of the flags of its two products and of its adder.
//
// Interface: in_valid, a_re, a_im, b_re, b_im, rm in; out_valid, z_re, z_im,
// flags_re, flags_im out. rst_n is an active-low asynchronous reset.
module fp_complex_mult
  import fp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] a_re,
  input  logic [31:0] a_im,
  input  logic [31:0] b_re,
  input  logic [31:0] b_im,
  input  round_mode_t rm,
  output logic        out_valid,
  output logic [31:0] z_re,
  output logic [31:0] z_im,
  output fp_flags_t   flags_re,
  output fp_flags_t   flags_im
);
  logic        v_rr, v_ii, v_ri, v_ir;
  logic [31:0] p_rr, p_ii, p_ri, p_ir;
  fp_flags_t   f_rr, f_ii, f_ri, f_ir;

  fpmul_vedic u_mul_rr (.clk, .rst_n, .in_valid, .a(a_re), .b(b_re), .rm,
                        .out_valid(v_rr), .z(p_rr), .flags(f_rr),
                        .is_nan(), .is_inf(), .is_zero());
  fpmul_vedic u_mul_ii (.clk, .rst_n, .in_valid, .a(a_im), .b(b_im), .rm,
                        .out_valid(v_ii), .z(p_ii), .flags(f_ii),
                        .is_nan(), .is_inf(), .is_zero());
  fpmul_vedic u_mul_ri (.clk, .rst_n, .in_valid, .a(a_re), .b(b_im), .rm,
                        .out_valid(v_ri), .z(p_ri), .flags(f_ri),
                        .is_nan(), .is_inf(), .is_zero());
  fpmul_vedic u_mul_ir (.clk, .rst_n, .in_valid, .a(a_im), .b(b_re), .rm,
                        .out_valid(v_ir), .z(p_ir), .flags(f_ir),
                        .is_nan(), .is_inf(), .is_zero());

  // The rounding mode travels beside the two multiplier stages, and the
  // product flags wait one clock beside the adders.
  round_mode_t rm_q1, rm_q2;
  fp_flags_t   pf_re, pf_im;
  fp_flags_t   af_re, af_im;
  logic        av_re, av_im;

  always_ff @(posedge clk) begin
    rm_q1 <= rm;
    rm_q2 <= rm_q1;
    pf_re <= f_rr | f_ii;
    pf_im <= f_ri | f_ir;
  end

  fp_addsub u_sub_re (.clk, .rst_n, .in_valid(v_rr & v_ii), .a(p_rr), .b(p_ii), .sub(1'b1),
                      .rm(rm_q2), .out_valid(av_re), .z(z_re), .flags(af_re));
  fp_addsub u_add_im (.clk, .rst_n, .in_valid(v_ri & v_ir), .a(p_ri), .b(p_ir), .sub(1'b0),
                      .rm(rm_q2), .out_valid(av_im), .z(z_im), .flags(af_im));

  assign out_valid = av_re & av_im;
  assign flags_re  = af_re | pf_re;
  assign flags_im  = af_im | pf_im;
endmodule
