// tb_fp_round_pack: random normalised significands and exponents from deep
// underflow to overflow, in all four rounding modes. The input is turned into
// its exact value as a double (the sticky bit read as a quarter of a round-bit
// step, which lies strictly between its neighbours), and the expected word is
// the reference rounding of that double. The flags are checked against the
// same value. Directed cases: a rounding carry into the exponent, the largest
// denormal rounding up to the smallest normal, and overflow in each mode.
module tb_fp_round_pack;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic              sign, zero;
  logic signed [10:0] exp_in;
  logic [26:0]       sig;
  round_mode_t       rm;
  logic [31:0]       z;
  fp_flags_t         flags;

  fp_round_pack dut (.sign, .exp_in, .sig_in(sig), .zero, .rm, .z, .flags);

  task automatic check(input logic s, input int e, input logic [26:0] g, input logic [1:0] m);
    real v, back, mag, mx;
    logic [31:0] want;
    logic ovf, unf, inx;
    sign = s; exp_in = 11'(e); sig = g; rm = round_mode_t'(m); zero = 1'b0;
    #1;
    v    = (real'(g >> 1) * 2.0 + (g[0] ? 0.5 : 0.0)) / (2.0 ** 26) * (2.0 ** (e - 127));
    v    = s ? -v : v;
    want = dbl_to_flt(v, m);
    back = flt_to_real(want);
    // Overflow: the value rounded with an unbounded exponent is 2^128 or more.
    mag  = (v < 0.0) ? -v : v;
    mx   = flt_to_real(32'h7F7F_FFFF);
    ovf  = (mag >= 2.0 ** 128)
        || (m == 2'd0 && mag >= mx + 2.0 ** 103)
        || (((m == 2'd1 && !s) || (m == 2'd2 && s)) && mag > mx);
    inx  = ovf || back != v;
    unf  = inx && (v < 1.0 / (2.0 ** 126)) && (v > -1.0 / (2.0 ** 126));
    checks++;
    if (z !== want || flags.overflow !== ovf || flags.inexact !== inx || flags.underflow !== unf
        || flags.invalid !== 1'b0) begin
      failures++;
      if (failures < 20)
        $display("s=%b e=%0d sig=%h rm=%0d: got %h %b, want %h o%b u%b x%b", s, e, g, m, z, flags, want, ovf, unf, inx);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++) begin
      check(0, 127, 27'h7FF_FFFC, 2'(m));      // 1.11..1 + guard: carry into exponent
      check(1, 127, 27'h7FF_FFFC, 2'(m));
      check(0, 0,   27'h7FF_FFFC, 2'(m));      // largest denormal region
      check(1, 0,   27'h7FF_FFFC, 2'(m));
      check(0, 254, 27'h7FF_FFFF, 2'(m));      // just below overflow
      check(1, 255, 27'h400_0000, 2'(m));      // overflow
      check(0, -30, 27'h400_0001, 2'(m));      // far below the denormals
      check(1, -30, 27'h400_0001, 2'(m));
    end
    for (int n = 0; n < 40000; n++)
      check(1'($urandom), int'($urandom_range(300)) - 40, {1'b1, 26'($urandom)}, 2'($urandom));
    // exact zero
    zero = 1; sign = 1; sig = '0; exp_in = 0; rm = RM_RNE;
    #1;
    checks++;
    if (z !== 32'h8000_0000 || flags !== '0) begin failures++; $display("zero: %h", z); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
