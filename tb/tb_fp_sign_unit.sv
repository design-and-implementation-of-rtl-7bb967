// tb_fp_sign_unit: all four sign combinations against the sign rule of a
// product (negative exactly when one operand is negative).
module tb_fp_sign_unit;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic sa, sb, sz;

  fp_sign_unit dut (.sign_a(sa), .sign_b(sb), .sign_z(sz));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      sa = i[1]; sb = i[0];
      #1;
      checks++;
      // (-1)^sa * (-1)^sb is negative when exactly one factor is negative.
      if (sz !== ((sa && !sb) || (!sa && sb))) begin failures++; $display("%b %b -> %b", sa, sb, sz); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
