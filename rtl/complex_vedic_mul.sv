// complex_vedic_mul: integer complex multiplier on signed Vedic multipliers.
//
// (ar + j*ai) * (br + j*bi) = (ar*br - ai*bi) + j*(ar*bi + ai*br): four real
// multiplications by signed_vedic_mul, one subtraction for the real part and
// one addition for the imaginary part. The results carry one bit more than a
// single product, so no input pair overflows.
//
// Interface: in_valid with ar, ai, br, bi (signed WIDTH bits); out_valid with
// pr, pi (signed 2*WIDTH+1 bits). Timing: the products and sums are
// combinational and registered once, so a result appears one clock after its
// operands, one result per clock. The output register and the valid flag are
// this design's choice. rst_n is an active-low asynchronous reset that clears
// out_valid.
module complex_vedic_mul #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DIGIT = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic signed [WIDTH-1:0]   ar,
  input  logic signed [WIDTH-1:0]   ai,
  input  logic signed [WIDTH-1:0]   br,
  input  logic signed [WIDTH-1:0]   bi,
  output logic                      out_valid,
  output logic signed [2*WIDTH:0]   pr,
  output logic signed [2*WIDTH:0]   pi
);
  logic signed [2*WIDTH-1:0] p_rr, p_ii, p_ri, p_ir;

  signed_vedic_mul #(.WIDTH(WIDTH), .DIGIT(DIGIT)) u_rr (.a(ar), .b(br), .p(p_rr));
  signed_vedic_mul #(.WIDTH(WIDTH), .DIGIT(DIGIT)) u_ii (.a(ai), .b(bi), .p(p_ii));
  signed_vedic_mul #(.WIDTH(WIDTH), .DIGIT(DIGIT)) u_ri (.a(ar), .b(bi), .p(p_ri));
  signed_vedic_mul #(.WIDTH(WIDTH), .DIGIT(DIGIT)) u_ir (.a(ai), .b(br), .p(p_ir));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      pr        <= '0;
      pi        <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        pr <= (2*WIDTH+1)'(p_rr) - (2*WIDTH+1)'(p_ii);
        pi <= (2*WIDTH+1)'(p_ri) + (2*WIDTH+1)'(p_ir);
      end
    end
  end
endmodule
