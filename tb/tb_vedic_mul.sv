// tb_vedic_mul: random and corner checks of the word-level Vedic multiplier
// at its default 16 bits (two 8-bit words), at 24 bits (three 8-bit words)
// and at 8 bits (two 4-bit words), against the integer product.
module tb_vedic_mul;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [15:0] a16, b16;  logic [31:0] p16;
  logic [23:0] a24, b24;  logic [47:0] p24;
  logic [7:0]  a8,  b8;   logic [15:0] p8;

  vedic_mul dut16 (.a(a16), .b(b16), .p(p16));
  vedic_mul #(.WIDTH(24), .DIGIT(8)) dut24 (.a(a24), .b(b24), .p(p24));
  vedic_mul #(.WIDTH(8),  .DIGIT(4)) dut8  (.a(a8),  .b(b8),  .p(p8));

  task automatic check(input logic [15:0] x16, y16, input logic [23:0] x24, y24,
                       input logic [7:0] x8, y8);
    a16 = x16; b16 = y16; a24 = x24; b24 = y24; a8 = x8; b8 = y8;
    #1;
    checks += 3;
    if (p16 !== 32'(x16) * 32'(y16)) begin failures++; $display("16: %h*%h got %h", x16, y16, p16); end
    if (p24 !== 48'(x24) * 48'(y24)) begin failures++; $display("24: %h*%h got %h", x24, y24, p24); end
    if (p8  !== 16'(x8)  * 16'(y8))  begin failures++; $display("8: %h*%h got %h", x8, y8, p8); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('1, '1, '1, '1, '1, '1);
    check('0, '1, '0, '1, '0, '1);
    check(16'h8000, 16'h8000, 24'h800000, 24'h800000, 8'h80, 8'h80);
    check(16'h00FF, 16'hFF00, 24'hFF00FF, 24'h00FF00, 8'h0F, 8'hF0);
    for (int n = 0; n < 30000; n++)
      check(16'($urandom), 16'($urandom), 24'($urandom), 24'($urandom), 8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
