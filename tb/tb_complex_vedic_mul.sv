// tb_complex_vedic_mul: drives one operand set per clock into the 16-bit
// integer complex multiplier and checks each result, and its one-clock
// latency, against (ar*br - ai*bi) + j(ar*bi + ai*br) worked out in integers.
// An 8-bit instance is checked the same way.
module tb_complex_vedic_mul;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               in_valid = 0, out_valid;
  logic signed [15:0] ar, ai, br, bi;
  logic signed [32:0] pr, pi;
  logic               v8;
  logic signed [16:0] pr8, pi8;

  complex_vedic_mul dut (.clk, .rst_n, .in_valid, .ar, .ai, .br, .bi, .out_valid, .pr, .pi);
  complex_vedic_mul #(.WIDTH(8), .DIGIT(4)) dut8 (.clk, .rst_n, .in_valid,
      .ar(ar[7:0]), .ai(ai[7:0]), .br(br[7:0]), .bi(bi[7:0]), .out_valid(v8), .pr(pr8), .pi(pi8));

  longint exp_r[$], exp_i[$], exp_r8[$], exp_i8[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard: a result is due exactly one clock after its operands.
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid !== (exp_r.size() != 0)) begin
        failures++; $display("out_valid wrong at %0t", $time);
      end
      if (out_valid && exp_r.size() != 0) begin
        longint r, i, r8, i8;
        r = exp_r.pop_front(); i = exp_i.pop_front();
        r8 = exp_r8.pop_front(); i8 = exp_i8.pop_front();
        checks += 2;
        if (pr !== 33'(r) || pi !== 33'(i)) begin
          failures++; $display("16-bit: got %0d %0d want %0d %0d", pr, pi, r, i);
        end
        if (!v8 || pr8 !== 17'(r8) || pi8 !== 17'(i8)) begin
          failures++; $display("8-bit: got %0d %0d want %0d %0d", pr8, pi8, r8, i8);
        end
      end
      if (in_valid) begin
        exp_r.push_back(longint'(ar) * br - longint'(ai) * bi);
        exp_i.push_back(longint'(ar) * bi + longint'(ai) * br);
        exp_r8.push_back(longint'($signed(ar[7:0])) * longint'($signed(br[7:0]))
                       - longint'($signed(ai[7:0])) * longint'($signed(bi[7:0])));
        exp_i8.push_back(longint'($signed(ar[7:0])) * longint'($signed(bi[7:0]))
                       + longint'($signed(ai[7:0])) * longint'($signed(br[7:0])));
      end
    end
  end

  initial begin
    ar = 0; ai = 0; br = 0; bi = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Extreme values: (-2^15 - j2^15)(-2^15 + j2^15) and the like.
    @(negedge clk);
    in_valid = 1; ar = 16'sh8000; ai = 16'sh8000; br = 16'sh8000; bi = 16'sh7FFF;
    @(negedge clk);
    ar = 16'sh8000; ai = 16'sh7FFF; br = 16'sh8000; bi = 16'sh8000;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      ar = 16'($urandom); ai = 16'($urandom); br = 16'($urandom); bi = 16'($urandom);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(posedge clk);
    if (exp_r.size() != 0) begin failures++; $display("results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
