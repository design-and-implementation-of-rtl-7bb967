// tb_signed_vedic_mul: checks the two's-complement Vedic multiplier at its
// default 16 bits (random and every sign/extreme combination) and exhaustively
// at 8 bits, against the signed integer product.
module tb_signed_vedic_mul;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [15:0] a16, b16;  logic signed [31:0] p16;
  logic signed [7:0]  a8,  b8;   logic signed [15:0] p8;

  signed_vedic_mul dut16 (.a(a16), .b(b16), .p(p16));
  signed_vedic_mul #(.WIDTH(8), .DIGIT(4)) dut8 (.a(a8), .b(b8), .p(p8));

  logic signed [15:0] corner [6] = '{16'sh8000, 16'sh7FFF, -16'sd1, 16'sd0, 16'sd1, -16'sd2};

  task automatic check16(input logic signed [15:0] x, y);
    longint exp_p;
    a16 = x; b16 = y;
    #1;
    exp_p = longint'(x) * longint'(y);
    checks++;
    if (p16 !== 32'(exp_p)) begin failures++; $display("%0d*%0d got %0d", x, y, p16); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (corner[i]) foreach (corner[j]) check16(corner[i], corner[j]);
    for (int n = 0; n < 20000; n++) check16(16'($urandom), 16'($urandom));
    for (int i = -128; i < 128; i++)
      for (int j = -128; j < 128; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks++;
        if (p8 !== 16'(i * j)) begin failures++; if (failures < 10) $display("8: %0d*%0d got %0d", i, j, p8); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
