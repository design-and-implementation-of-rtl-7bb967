// vedic_complex_top: complex multipliers built on Vedic (Urdhva-Tiryagbhyam)
// multiplication.
//
// Two complex multipliers stand side by side, sharing only clock and reset:
//   - fp_complex_mult: IEEE-754 single-precision complex multiplier, four
//     floating-point Vedic multipliers plus one subtractor and one adder,
//     result three clocks after the operands;
//   - complex_vedic_mul: integer complex multiplier on INT_WIDTH-bit signed
//     operands (16 by default; 8 is the other size the design is described
//     for), result one clock after the operands.
// Each has its own valid strobe; both accept one operand set per clock.
//
// Interface: fp_* ports for the floating-point unit, int_* ports for the
// integer unit. rst_n is an active-low asynchronous reset of the valid bits.
module vedic_complex_top
  import fp_pkg::*;
#(
  parameter int unsigned INT_WIDTH = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // floating-point complex multiplier
  input  logic                        fp_in_valid,
  input  logic [31:0]                 fp_a_re,
  input  logic [31:0]                 fp_a_im,
  input  logic [31:0]                 fp_b_re,
  input  logic [31:0]                 fp_b_im,
  input  round_mode_t                 fp_rm,
  output logic                        fp_out_valid,
  output logic [31:0]                 fp_z_re,
  output logic [31:0]                 fp_z_im,
  output fp_flags_t                   fp_flags_re,
  output fp_flags_t                   fp_flags_im,
  // integer complex multiplier
  input  logic                        int_in_valid,
  input  logic signed [INT_WIDTH-1:0] int_a_re,
  input  logic signed [INT_WIDTH-1:0] int_a_im,
  input  logic signed [INT_WIDTH-1:0] int_b_re,
  input  logic signed [INT_WIDTH-1:0] int_b_im,
  output logic                        int_out_valid,
  output logic signed [2*INT_WIDTH:0] int_z_re,
  output logic signed [2*INT_WIDTH:0] int_z_im
);
  fp_complex_mult u_fp (
    .clk, .rst_n,
    .in_valid(fp_in_valid), .a_re(fp_a_re), .a_im(fp_a_im), .b_re(fp_b_re), .b_im(fp_b_im),
    .rm(fp_rm),
    .out_valid(fp_out_valid), .z_re(fp_z_re), .z_im(fp_z_im),
    .flags_re(fp_flags_re), .flags_im(fp_flags_im)
  );

  complex_vedic_mul #(.WIDTH(INT_WIDTH), .DIGIT(INT_WIDTH/2)) u_int (
    .clk, .rst_n,
    .in_valid(int_in_valid), .ar(int_a_re), .ai(int_a_im), .br(int_b_re), .bi(int_b_im),
    .out_valid(int_out_valid), .pr(int_z_re), .pi(int_z_im)
  );
endmodule
