// tb_fp_complex_mult: complex products in single precision, one operand set
// per clock with gaps, each result checked three clocks after its operands.
// The expected parts are built from the reference operations in the order the
// hardware rounds them: re = round(round(ar*br) - round(ai*bi)),
// im = round(round(ar*bi) + round(ai*br)). Operand exponents stay within a
// window that keeps the reference sums exact, in all four rounding modes;
// directed sets add a product overflow, a NaN and 0 x inf.
module tb_fp_complex_mult;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, out_valid;
  logic [31:0] ar, ai, br, bi, zr, zi;
  round_mode_t rm;
  fp_flags_t   fr, fi;

  fp_complex_mult dut (.clk, .rst_n, .in_valid, .a_re(ar), .a_im(ai), .b_re(br), .b_im(bi), .rm,
                       .out_valid, .z_re(zr), .z_im(zi), .flags_re(fr), .flags_im(fi));

  logic [31:0] q_r[$], q_i[$];
  int          q_age[$];
  int          n_ovf = 0, n_inv = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (q_age.size() != 0 && q_age[0] == 2) begin
        logic [31:0] wr, wi;
        wr = q_r.pop_front(); wi = q_i.pop_front(); void'(q_age.pop_front());
        checks++;
        if (!out_valid || (is_nan(wr) ? !is_nan(zr) : zr !== wr) || (is_nan(wi) ? !is_nan(zi) : zi !== wi)) begin
          failures++; $display("got %b %h %h want %h %h", out_valid, zr, zi, wr, wi);
        end
        n_ovf += (fr.overflow || fi.overflow) ? 1 : 0;
        n_inv += (fr.invalid || fi.invalid) ? 1 : 0;
      end else if (out_valid) begin
        failures++; $display("unexpected out_valid at %0t", $time);
      end
      foreach (q_age[i]) q_age[i]++;
      if (in_valid) begin
        logic [31:0] bd;
        bd = ref_mul(ai, bi, rm);
        q_r.push_back(ref_add(ref_mul(ar, br, rm), {~bd[31], bd[30:0]}, rm));
        q_i.push_back(ref_add(ref_mul(ar, bi, rm), ref_mul(ai, br, rm), rm));
        q_age.push_back(0);
      end
    end
  end

  task automatic send(input logic [31:0] w, x, y, v, input logic [1:0] m);
    @(negedge clk);
    in_valid = 1; ar = w; ai = x; br = y; bi = v; rm = round_mode_t'(m);
  endtask

  initial begin
    ar = 0; ai = 0; br = 0; bi = 0; rm = RM_RNE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // (1 + 2j)(3 + 4j) = -5 + 10j
    send(32'h3F80_0000, 32'h4000_0000, 32'h4040_0000, 32'h4080_0000, 0);
    send(32'h7F00_0000, 32'h3F80_0000, 32'h7F00_0000, 32'h3F80_0000, 0);  // overflow
    send(32'h7FC0_0000, 32'h3F80_0000, 32'h3F80_0000, 32'h3F80_0000, 0);  // NaN
    send(32'h7F80_0000, 32'h0000_0000, 32'h0000_0000, 32'h3F80_0000, 0);  // 0 x inf
    for (int n = 0; n < 4000; n++) begin
      if ($urandom_range(3) == 0) begin
        @(negedge clk); in_valid = 0;
      end
      send(rand_flt(120, 134), rand_flt(120, 134), rand_flt(120, 134), rand_flt(120, 134), 2'($urandom));
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    if (q_age.size() != 0) begin failures++; $display("results missing"); end
    if (n_ovf == 0 || n_inv == 0) begin failures++; $display("overflow or invalid never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
