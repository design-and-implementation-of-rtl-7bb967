// tb_fpmul_vedic: the floating-point multiplier, fed one operand pair per
// clock with gaps, every result checked two clocks after its operands.
// Operands: the worked example -19.0 x 9.5 = -180.5 and the two pairs of the
// published simulation (43061000 x C0100000 = C396D200, 40F00000 x 41780000 =
// 42E88000), then random normal operands, denormal operands, products that
// overflow and underflow, and all special classes, in all four rounding modes.
// Expected words come from the double-precision reference.
// Two smaller instances run exhaustively over all operand pairs of an 8-bit
// format (4 exponent, 3 fraction bits) and over random binary16 pairs, every
// rounding mode, with the same scoreboard rule.
module tb_fpmul_vedic;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, out_valid, is_nan_o, is_inf_o, is_zero_o;
  logic [31:0] a, b, z;
  round_mode_t rm;
  fp_flags_t   flags;

  fpmul_vedic dut (.clk, .rst_n, .in_valid, .a, .b, .rm, .out_valid, .z, .flags,
                   .is_nan(is_nan_o), .is_inf(is_inf_o), .is_zero(is_zero_o));

  // small formats: binary16 and an 8-bit format
  logic        v16_in = 0, v16_out, v8_in = 0, v8_out;
  logic [15:0] a16, b16, z16;
  logic [7:0]  a8, b8, z8;
  round_mode_t rm_s = RM_RNE;
  fp_flags_t   f16, f8;
  logic [31:0] q16[$], q8[$];

  fpmul_vedic #(.EXP_W(5), .FRAC_W(10)) dut16 (.clk, .rst_n, .in_valid(v16_in), .a(a16), .b(b16), .rm(rm_s),
      .out_valid(v16_out), .z(z16), .flags(f16), .is_nan(), .is_inf(), .is_zero());
  fpmul_vedic #(.EXP_W(4), .FRAC_W(3)) dut8 (.clk, .rst_n, .in_valid(v8_in), .a(a8), .b(b8), .rm(rm_s),
      .out_valid(v8_out), .z(z8), .flags(f8), .is_nan(), .is_inf(), .is_zero());

  // The small instances are driven every clock, so results are due at a fixed
  // depth: two entries behind the one pushed this clock.
  always @(posedge clk) begin
    if (rst_n) begin
      if (v16_out) begin
        logic [31:0] w;
        w = q16.pop_front();
        checks++;
        if (((w >> 10) & 32'h1F) == 32'h1F && (w & 32'h3FF) != 0 ? !(z16[14:10] == 5'h1F && z16[9:0] != 0)
                                                                 : (32'(z16) !== w)) begin
          failures++; $display("binary16: got %h want %h", z16, w);
        end
      end
      if (v8_out) begin
        logic [31:0] w;
        w = q8.pop_front();
        checks++;
        if (((w >> 3) & 32'hF) == 32'hF && (w & 32'h7) != 0 ? !(z8[6:3] == 4'hF && z8[2:0] != 0)
                                                             : (32'(z8) !== w)) begin
          failures++; $display("8-bit: %h x %h rm %0d got %h want %h", a8, b8, rm_s, z8, w);
        end
      end
      if (v16_in) q16.push_back(ref_mul_fmt(32'(a16), 32'(b16), rm_s, 5, 10));
      if (v8_in)  q8.push_back(ref_mul_fmt(32'(a8), 32'(b8), rm_s, 4, 3));
    end
  end

  logic [31:0] q_want[$];
  logic [1:0]  q_age[$];   // clocks since the operands were taken
  int n_ovf = 0, n_unf = 0, n_nan = 0, n_inf = 0, n_zero = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      // results due now are those taken two clocks ago
      if (out_valid) begin
        if (q_want.size() == 0 || q_age[0] != 2'd1) begin
          failures++; $display("unexpected result at %0t", $time);
        end else begin
          logic [31:0] w;
          w = q_want.pop_front(); void'(q_age.pop_front());
          checks++;
          if (is_nan(w) ? !is_nan(z) : (z !== w)) begin
            failures++; $display("got %h want %h", z, w);
          end
          if (is_nan_o !== is_nan(w) || is_inf_o !== is_inf(w) || is_zero_o !== (w[30:0] == 0)) begin
            failures++; $display("class flags wrong for %h", w);
          end
          n_ovf  += int'(flags.overflow);
          n_unf  += int'(flags.underflow);
          n_nan  += int'(is_nan_o);
          n_inf  += int'(is_inf_o);
          n_zero += int'(is_zero_o);
        end
      end else if (q_want.size() != 0 && q_age[0] == 2'd1) begin
        failures++; $display("result missing at %0t", $time);
        void'(q_want.pop_front()); void'(q_age.pop_front());
      end
      foreach (q_age[i]) q_age[i] = q_age[i] + 2'd1;
      if (in_valid) begin
        q_want.push_back(ref_mul(a, b, rm));
        q_age.push_back(2'd0);
      end
    end
  end

  task automatic send(input logic [31:0] x, y, input logic [1:0] m);
    @(negedge clk);
    in_valid = 1; a = x; b = y; rm = round_mode_t'(m);
  endtask

  initial begin
    a = 0; b = 0; rm = RM_RNE;
    // The published results themselves, so that the reference is held to them.
    checks += 3;
    if (ref_mul(32'h4306_1000, 32'hC010_0000, 2'd0) !== 32'hC396_D200) begin failures++; $display("ref 1"); end
    if (ref_mul(32'h40F0_0000, 32'h4178_0000, 2'd0) !== 32'h42E8_8000) begin failures++; $display("ref 2"); end
    if (ref_mul(32'hC198_0000, 32'h4118_0000, 2'd0) !== 32'hC334_8000) begin failures++; $display("ref 3"); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    send(32'hC198_0000, 32'h4118_0000, 0);     // -19.0 x 9.5
    send(32'h4306_1000, 32'hC010_0000, 0);     // from the published waveform
    send(32'h40F0_0000, 32'h4178_0000, 0);
    // specials
    send(32'h7F80_0000, 32'h0000_0000, 0);
    send(32'hFF80_0000, 32'h4000_0000, 0);
    send(32'h8000_0000, 32'h4000_0000, 0);
    send(32'h7FC0_0001, 32'h4000_0000, 0);
    send(32'h7F00_0000, 32'h7F00_0000, 0);     // overflow
    send(32'h0080_0000, 32'h0080_0000, 0);     // underflow to zero
    send(32'h0080_0000, 32'h3F00_0001, 0);     // result denormal
    for (int m = 0; m < 4; m++) begin
      send(32'h7F7F_FFFF, 32'h3F80_0001, 2'(m));
      send(32'hFF7F_FFFF, 32'h3F80_0001, 2'(m));
      send(32'h0000_0001, 32'h3F00_0000, 2'(m));
      send(32'h8000_0001, 32'h3F00_0000, 2'(m));
    end
    for (int n = 0; n < 6000; n++) begin
      logic [31:0] x, y;
      case ($urandom_range(5))
        0:       begin x = rand_flt(1, 254);  y = rand_flt(1, 254);   end
        1:       begin x = rand_flt(0, 0);    y = rand_flt(100, 160); end   // denormal x normal
        2:       begin x = rand_flt(1, 40);   y = rand_flt(1, 90);    end   // underflow region
        3:       begin x = rand_flt(200, 254); y = rand_flt(150, 254); end  // overflow region
        default: begin x = rand_flt(90, 165); y = rand_flt(90, 165);  end
      endcase
      if ($urandom_range(3) == 0) begin
        @(negedge clk); in_valid = 0;
      end
      send(x, y, 2'($urandom));
    end
    @(negedge clk);
    in_valid = 0;
    // small formats: every 8-bit pair in each mode, random binary16 pairs
    for (int m = 0; m < 4; m++)
      for (int i = 0; i < 65536; i++) begin
        @(negedge clk);
        rm_s = round_mode_t'(m);
        v8_in = 1; a8 = 8'(i >> 8); b8 = 8'(i);
        v16_in = 1; a16 = 16'($urandom); b16 = 16'($urandom);
        if (i % 8 == 0) a16[14:10] = 5'($urandom_range(3));   // denormal / tiny region
      end
    @(negedge clk);
    v8_in = 0; v16_in = 0;
    repeat (4) @(posedge clk);
    if (q8.size() != 0 || q16.size() != 0) begin failures++; $display("small-format results missing"); end
    if (q_want.size() != 0) begin failures++; $display("%0d results missing", q_want.size()); end
    if (n_ovf == 0 || n_unf == 0 || n_nan == 0 || n_inf == 0 || n_zero == 0) begin
      failures++; $display("a case was never exercised: ovf %0d unf %0d nan %0d inf %0d zero %0d",
                           n_ovf, n_unf, n_nan, n_inf, n_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
