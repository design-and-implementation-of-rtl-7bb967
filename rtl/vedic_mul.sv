// vedic_mul: modular unsigned Vedic multiplier.
//
// The operands are treated as numbers of N = WIDTH/DIGIT words in radix
// X = 2^DIGIT, A = sum a_i X^i and B = sum b_j X^j. Every word product
// a_i*b_j is made by a bit-level urdhva_mult of DIGIT bits, so the smaller
// multiplier is the building block of the larger one. The word products are
// then summed crosswise per column k = i+j, the same vertical-and-crosswise
// pattern as inside urdhva_mult but one level up, and the column sums are
// resolved with a carry that moves one word per column. With WIDTH=24 and
// DIGIT=8 the operands have three words, a2 a1 a0 and b2 b1 b0, and the
// five columns are a0b0, a1b0+a0b1, a2b0+a1b1+a0b2, a2b1+a1b2 and a2b2.
//
// Interface: a, b unsigned WIDTH bits; p = a*b, 2*WIDTH bits. WIDTH must be a
// multiple of DIGIT. Timing: purely combinational. The split of operands into
// words follows the published formulation; the word size DIGIT = 8 is this
// design's choice.
module vedic_mul #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DIGIT = 8
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p
);
  localparam int unsigned N  = WIDTH / DIGIT;
  // A column holds up to N word products of 2*DIGIT bits, plus the carry.
  localparam int unsigned CW = 2*DIGIT + $clog2(N + 1) + 1;

  initial begin
    assert (WIDTH % DIGIT == 0)
      else $error("vedic_mul: WIDTH (%0d) must be a multiple of DIGIT (%0d)", WIDTH, DIGIT);
  end

  logic [2*DIGIT-1:0] wp [N][N];   // word products a_i * b_j

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      urdhva_mult #(.WIDTH(DIGIT)) u_word (
        .a(a[i*DIGIT +: DIGIT]),
        .b(b[j*DIGIT +: DIGIT]),
        .p(wp[i][j])
      );
    end
  end

  always_comb begin
    logic [CW-1:0] col;
    logic [CW-1:0] carry;
    carry = '0;
    p     = '0;
    for (int k = 0; k < int'(2*N) - 1; k++) begin
      col = carry;
      for (int i = 0; i < N; i++) begin
        if (k - i >= 0 && k - i < N)
          col = col + CW'(wp[i][k-i]);
      end
      if (k < int'(2*N) - 2) begin
        p[k*DIGIT +: DIGIT] = col[DIGIT-1:0];
        carry               = col >> DIGIT;
      end else begin
        // The last column holds the remaining 2*DIGIT product bits.
        p[k*DIGIT +: 2*DIGIT] = col[2*DIGIT-1:0];
      end
    end
  end
endmodule
