// tb_urdhva_mult: exhaustive check of the bit-level Urdhva multiplier at the
// default 8 bits and at 3 bits (the a2 a1 a0 x b2 b1 b0 case), against the
// integer product.
module tb_urdhva_mult;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [2:0]  a3, b3;
  logic [5:0]  p3;

  urdhva_mult dut (.a(a8), .b(b8), .p(p8));
  urdhva_mult #(.WIDTH(3)) dut3 (.a(a3), .b(b3), .p(p3));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks++;
        if (p8 !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("8-bit %0d*%0d: got %0d", i, j, p8);
        end
      end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a3 = 3'(i); b3 = 3'(j);
        #1;
        checks++;
        if (p3 !== 6'(i * j)) begin
          failures++;
          $display("3-bit %0d*%0d: got %0d", i, j, p3);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
