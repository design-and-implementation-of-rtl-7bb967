// tb_fp_exponent_unit: every pair of exponent fields against the unbiased
// sum rebiased: (ea-127) + (eb-127) + 127, with a zero field read as the
// denormal scale 2^-126.
module tb_fp_exponent_unit;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0]        ea, eb;
  logic signed [10:0] ez;

  fp_exponent_unit dut (.exp_a(ea), .exp_b(eb), .exp_z(ez));

  function automatic int unbiased(int e);
    return (e == 0) ? -126 : e - 127;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        ea = 8'(i); eb = 8'(j);
        #1;
        checks++;
        if (int'(ez) != unbiased(i) + unbiased(j) + 127) begin
          failures++;
          if (failures < 10) $display("%0d %0d -> %0d", i, j, ez);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
