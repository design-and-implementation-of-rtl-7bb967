// tb_fp_mantissa_unit: significand products for normal, denormal and zero
// operands against the integer product of {hidden bit, fraction}, including
// the worked example -19.0 x 9.5 (fractions 0011000..., 0011000...).
module tb_fp_mantissa_unit;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic [47:0] prod;

  fp_mantissa_unit dut (.exp_a(ea), .frac_a(fa), .exp_b(eb), .frac_b(fb), .prod(prod));

  task automatic check(input logic [7:0] xe, ye, input logic [22:0] xf, yf);
    longint unsigned sa, sb;
    ea = xe; eb = ye; fa = xf; fb = yf;
    #1;
    sa = (xe == 0) ? longint'(xf) : longint'(xf) + (64'd1 << 23);
    sb = (ye == 0) ? longint'(yf) : longint'(yf) + (64'd1 << 23);
    checks++;
    if (prod !== 48'(sa * sb)) begin failures++; $display("%h.%h x %h.%h got %h", xe, xf, ye, yf, prod); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(8'd131, 8'd130, 23'h180000, 23'h180000);     // 1.0011 x 1.0011
    checks++;                                            // 1.1875^2 = 1.41015625
    if (prod !== 48'h5A40_0000_0000) begin failures++; $display("example product %h", prod); end
    check(8'd0, 8'd100, 23'h7FFFFF, 23'h7FFFFF);
    check(8'd0, 8'd0, 23'h000001, 23'h400000);
    check(8'd254, 8'd254, 23'h7FFFFF, 23'h7FFFFF);
    check(8'd0, 8'd0, 23'h0, 23'h0);
    for (int n = 0; n < 20000; n++)
      check(($urandom_range(7) == 0) ? 8'd0 : 8'($urandom), 8'($urandom), 23'($urandom), 23'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
