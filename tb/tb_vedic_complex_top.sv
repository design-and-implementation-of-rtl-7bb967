// tb_vedic_complex_top: end-to-end test of the whole design at its default
// parameters. Both complex multipliers run at the same time, each fed one
// operand set per clock with random gaps; the floating-point results are
// checked three clocks after their operands and the integer results one clock
// after, against reference arithmetic. The test counts how often each
// mechanism happens and fails if one never does: each rounding mode, a
// product significand of 2 or more (the right shift in normalisation), a
// denormal operand, a cancelling subtraction, overflow, underflow, an invalid
// operation, NaN and infinite results, and on the integer side products of
// every sign and the most negative operand.
module tb_vedic_complex_top;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               fp_in_valid = 0, fp_out_valid, int_in_valid = 0, int_out_valid;
  logic [31:0]        ar, ai, br, bi, zr, zi;
  round_mode_t        rm;
  fp_flags_t          fr, fi;
  logic signed [15:0] iar, iai, ibr, ibi;
  logic signed [32:0] izr, izi;

  vedic_complex_top dut (
    .clk, .rst_n,
    .fp_in_valid, .fp_a_re(ar), .fp_a_im(ai), .fp_b_re(br), .fp_b_im(bi), .fp_rm(rm),
    .fp_out_valid, .fp_z_re(zr), .fp_z_im(zi), .fp_flags_re(fr), .fp_flags_im(fi),
    .int_in_valid, .int_a_re(iar), .int_a_im(iai), .int_b_re(ibr), .int_b_im(ibi),
    .int_out_valid, .int_z_re(izr), .int_z_im(izi)
  );

  // mechanism counters
  int n_rm[4] = '{0, 0, 0, 0};
  int n_shift = 0, n_denorm = 0, n_cancel = 0, n_ovf = 0, n_unf = 0, n_inv = 0, n_nan = 0, n_inf = 0;
  int n_int_neg = 0, n_int_pos = 0, n_int_min = 0;

  logic [31:0] q_r[$], q_i[$];
  int          q_age[$];
  longint      qi_r[$], qi_i[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit sig_ge2(logic [31:0] x, y);
    longint unsigned sx, sy;
    sx = {40'b0, x[30:23] != 0, x[22:0]};
    sy = {40'b0, y[30:23] != 0, y[22:0]};
    return (sx * sy) >= (64'd1 << 47);
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      // floating-point side, latency 3
      if (q_age.size() != 0 && q_age[0] == 2) begin
        logic [31:0] wr, wi;
        wr = q_r.pop_front(); wi = q_i.pop_front(); void'(q_age.pop_front());
        checks++;
        if (!fp_out_valid || (is_nan(wr) ? !is_nan(zr) : zr !== wr) || (is_nan(wi) ? !is_nan(zi) : zi !== wi)) begin
          failures++; $display("fp: got %b %h %h want %h %h", fp_out_valid, zr, zi, wr, wi);
        end
        n_ovf += (fr.overflow  || fi.overflow)  ? 1 : 0;
        n_unf += (fr.underflow || fi.underflow) ? 1 : 0;
        n_inv += (fr.invalid   || fi.invalid)   ? 1 : 0;
        n_nan += (is_nan(zr) || is_nan(zi)) ? 1 : 0;
        n_inf += (is_inf(zr) || is_inf(zi)) ? 1 : 0;
      end else if (fp_out_valid) begin
        failures++; $display("fp: unexpected out_valid at %0t", $time);
      end
      foreach (q_age[i]) q_age[i]++;
      if (fp_in_valid) begin
        logic [31:0] rr, ii, bd;
        rr = ref_mul(ar, br, rm);
        ii = ref_mul(ai, bi, rm);
        bd = {~ii[31], ii[30:0]};
        q_r.push_back(ref_add(rr, bd, rm));
        q_i.push_back(ref_add(ref_mul(ar, bi, rm), ref_mul(ai, br, rm), rm));
        q_age.push_back(0);
        n_rm[rm]++;
        n_shift  += sig_ge2(ar, br) ? 1 : 0;
        n_denorm += (ar[30:23] == 0 && ar[22:0] != 0) ? 1 : 0;
        if (!is_nan(rr) && !is_inf(rr) && rr[30:23] != 0 && rr[31] != bd[31]
            && rr[30:23] == ii[30:23] && ref_add(rr, bd, rm) != 0) n_cancel++;
      end
      // integer side, latency 1
      if (int_out_valid !== (qi_r.size() != 0)) begin
        failures++; $display("int: out_valid wrong at %0t", $time);
      end
      if (int_out_valid && qi_r.size() != 0) begin
        longint r, i;
        r = qi_r.pop_front(); i = qi_i.pop_front();
        checks++;
        if (izr !== 33'(r) || izi !== 33'(i)) begin
          failures++; $display("int: got %0d %0d want %0d %0d", izr, izi, r, i);
        end
        n_int_neg += (r < 0) ? 1 : 0;
        n_int_pos += (r > 0) ? 1 : 0;
      end
      if (int_in_valid) begin
        qi_r.push_back(longint'(iar) * ibr - longint'(iai) * ibi);
        qi_i.push_back(longint'(iar) * ibi + longint'(iai) * ibr);
        n_int_min += (iar == 16'sh8000 || ibr == 16'sh8000) ? 1 : 0;
      end
    end
  end

  initial begin
    ar = 0; ai = 0; br = 0; bi = 0; rm = RM_RNE;
    iar = 0; iai = 0; ibr = 0; ibi = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      fp_in_valid  = ($urandom_range(4) != 0);
      int_in_valid = ($urandom_range(4) != 0);
      rm = round_mode_t'($urandom_range(3));
      case ($urandom_range(9))
        0: begin ar = rand_flt(0, 0); ai = rand_flt(0, 0);                       // denormals, underflow
                 br = rand_flt(120, 140); bi = rand_flt(120, 140); end
        1: begin ar = rand_flt(200, 254); ai = rand_flt(200, 254);               // overflow
                 br = rand_flt(200, 254); bi = rand_flt(200, 254); rm = RM_RNE; end
        2: begin ar = 32'h7F80_0000; ai = 32'h0000_0000;                          // inf and 0 x inf
                 br = rand_flt(120, 130); bi = rand_flt(120, 130); rm = RM_RNE; end
        3: begin ar = rand_flt(125, 130); br = rand_flt(125, 130);               // cancellation
                 ai = ar; bi = br; ai[1:0] = 2'($urandom); rm = RM_RNE; end
        default: begin
                 ar = rand_flt(120, 134); ai = rand_flt(120, 134);
                 br = rand_flt(120, 134); bi = rand_flt(120, 134); end
      endcase
      if ($urandom_range(7) == 0) iar = 16'sh8000; else iar = 16'($urandom);
      iai = 16'($urandom); ibr = 16'($urandom); ibi = 16'($urandom);
    end
    @(negedge clk);
    fp_in_valid = 0; int_in_valid = 0;
    repeat (5) @(posedge clk);
    if (q_age.size() != 0 || qi_r.size() != 0) begin failures++; $display("results missing"); end
    $display("mechanisms: rm %0d/%0d/%0d/%0d shift %0d denormal %0d cancel %0d ovf %0d unf %0d inv %0d nan %0d inf %0d",
             n_rm[0], n_rm[1], n_rm[2], n_rm[3], n_shift, n_denorm, n_cancel, n_ovf, n_unf, n_inv, n_nan, n_inf);
    $display("integer: negative %0d positive %0d most-negative operand %0d", n_int_neg, n_int_pos, n_int_min);
    foreach (n_rm[i]) if (n_rm[i] == 0) begin failures++; $display("rounding mode %0d never used", i); end
    if (n_shift == 0 || n_denorm == 0 || n_cancel == 0 || n_ovf == 0 || n_unf == 0 || n_inv == 0
        || n_nan == 0 || n_inf == 0 || n_int_neg == 0 || n_int_pos == 0 || n_int_min == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
