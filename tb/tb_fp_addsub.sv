// tb_fp_addsub: the floating-point adder/subtractor, one operation per clock,
// each result checked one clock after its operands against the
// double-precision reference (exact for exponent differences up to 29, which
// the random operands respect). Covers cancellation, denormals, exact zeros
// and their signs, overflow, infinities and NaNs in all four rounding modes.
module tb_fp_addsub;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, out_valid, sub;
  logic [31:0] a, b, z;
  round_mode_t rm;
  fp_flags_t   flags;

  fp_addsub dut (.clk, .rst_n, .in_valid, .a, .b, .sub, .rm, .out_valid, .z, .flags);

  logic [31:0] q_want[$];
  int n_ovf = 0, n_inv = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid !== (q_want.size() != 0)) begin
        failures++; $display("out_valid wrong at %0t", $time);
      end
      if (out_valid && q_want.size() != 0) begin
        logic [31:0] w;
        w = q_want.pop_front();
        checks++;
        if (is_nan(w) ? !is_nan(z) : (z !== w)) begin
          failures++; $display("got %h want %h", z, w);
        end
        n_ovf += int'(flags.overflow);
        n_inv += int'(flags.invalid);
      end
      if (in_valid)
        q_want.push_back(ref_add(a, sub ? {~b[31], b[30:0]} : b, rm));
    end
  end

  task automatic send(input logic [31:0] x, y, input logic s, input logic [1:0] m);
    @(negedge clk);
    in_valid = 1; a = x; b = y; sub = s; rm = round_mode_t'(m);
  endtask

  initial begin
    a = 0; b = 0; sub = 0; rm = RM_RNE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      send(32'h3F80_0000, 32'h3F80_0000, 1, 2'(m));   // 1 - 1 = +-0
      send(32'h8000_0000, 32'h8000_0000, 0, 2'(m));   // -0 + -0
      send(32'h0000_0000, 32'h8000_0000, 0, 2'(m));   // +0 + -0
      send(32'h7F7F_FFFF, 32'h7F7F_FFFF, 0, 2'(m));   // overflow
      send(32'h7F80_0000, 32'h7F80_0000, 1, 2'(m));   // inf - inf
      send(32'h7F80_0000, 32'h3F80_0000, 0, 2'(m));
      send(32'h3F80_0000, 32'hFF80_0000, 1, 2'(m));
      send(32'h7FC0_0000, 32'h3F80_0000, 0, 2'(m));
      send(32'h0080_0000, 32'h0000_0001, 1, 2'(m));   // normal - denormal
      send(32'h3F80_0000, 32'h3380_0001, 0, 2'(m));   // rounding across half
      send(32'h3F80_0000, 32'h3380_0000, 1, 2'(m));
    end
    for (int n = 0; n < 8000; n++) begin
      logic [31:0] x, y;
      int ex, ey;
      case ($urandom_range(4))
        0:       begin ex = int'($urandom_range(254)) + 1; ey = ex - 3 + int'($urandom_range(6)); end   // cancellation
        1:       begin ex = int'($urandom_range(6)); ey = int'($urandom_range(6)); end                 // denormals
        2:       begin ex = 240 + int'($urandom_range(14)); ey = 240 + int'($urandom_range(14)); end   // overflow
        default: begin ex = int'($urandom_range(200)) + 20; ey = ex - 29 + int'($urandom_range(58)); end
      endcase
      if (ey < 0) ey = 0;
      if (ey > 254) ey = 254;
      x = rand_flt(ex, ex); y = rand_flt(ey, ey);
      if (($urandom_range(3) == 0) && (ex < 7 || ey < 7)) y = rand_flt(0, 0);
      if ($urandom_range(4) == 0) begin
        @(negedge clk); in_valid = 0;
      end
      send(x, y, 1'($urandom), 2'($urandom));
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(posedge clk);
    if (q_want.size() != 0) begin failures++; $display("%0d results missing", q_want.size()); end
    if (n_ovf == 0 || n_inv == 0) begin failures++; $display("overflow or invalid never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
