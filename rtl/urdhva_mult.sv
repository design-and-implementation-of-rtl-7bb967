// urdhva_mult: bit-level "vertically and crosswise" (Urdhva-Tiryagbhyam)
// unsigned multiplier.
//
// Column k of the product collects every crosswise bit product a[i]&b[k-i]:
// column 0 is the vertical product a0b0, column 1 the cross a1b0 + a0b1,
// column 2 the star a2b0 + a1b1 + a0b2 and so on, exactly the line patterns
// of the sutra. All column sums are formed at the same time. They are then
// combined from the least significant column upward: column k plus the carry
// from column k-1 gives product bit k, and the rest is carried into column
// k+1. The last carry forms the top product bits.
//
// Interface: a, b unsigned WIDTH bits; p = a*b, 2*WIDTH bits.
// The column pattern is the published scheme; the way column sums and
// carries are resolved, and the lack of any register, are this design's.
// Timing: purely combinational.
module urdhva_mult #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p
);
  // A column holds at most WIDTH ones; with the incoming carry it stays below 2*WIDTH.
  localparam int unsigned CW = $clog2(2*WIDTH) + 1;

  logic [CW-1:0] col [2*WIDTH-1];

  always_comb begin
    for (int k = 0; k < 2*WIDTH-1; k++) begin
      col[k] = '0;
      for (int i = 0; i < WIDTH; i++) begin
        if (k - i >= 0 && k - i < WIDTH)
          col[k] = col[k] + CW'(a[i] & b[k-i]);
      end
    end
  end

  always_comb begin
    logic [CW-1:0] acc;
    logic [CW-1:0] carry;
    carry = '0;
    p     = '0;
    for (int k = 0; k < 2*WIDTH-1; k++) begin
      acc   = col[k] + carry;
      p[k]  = acc[0];
      carry = acc >> 1;
    end
    p[2*WIDTH-1] = carry[0];
  end
endmodule
