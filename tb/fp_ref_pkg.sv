// fp_ref_pkg: reference arithmetic for the floating-point testbenches.
//
// Values are carried as doubles. A product of two singles, and a sum of two
// singles whose exponents differ by at most 29, is exact in double precision,
// so rounding that double once to single precision gives the correctly
// rounded IEEE-754 result. dbl_to_flt does that rounding from the bits of the
// double, for each of the four rounding modes (0 nearest-even, 1 up, 2 down,
// 3 toward zero), including denormal results and overflow.
package fp_ref_pkg;

  function automatic real flt_to_real(logic [31:0] f);
    logic        s;
    logic [7:0]  e;
    logic [22:0] fr;
    real         v;
    s = f[31]; e = f[30:23]; fr = f[22:0];
    if (e == 8'hFF) begin
      if (fr != '0) return $bitstoreal(64'h7FF8_0000_0000_0000);
      return $bitstoreal({s, 11'h7FF, 52'b0});
    end
    if (e == 8'h00) begin
      v = real'(fr) / (2.0 ** 149);
      return s ? -v : v;
    end
    return $bitstoreal({s, 11'(int'(e) - 127 + 1023), fr, 29'b0});
  endfunction

  function automatic logic [31:0] dbl_to_flt(real r, logic [1:0] rm);
    logic [63:0]     d;
    logic            s;
    int              e, ef, sh;
    longint unsigned m, q, rem, half, bits;
    logic            inc;
    d = $realtobits(r);
    s = d[63];
    e = int'(d[62:52]);
    if (e == 2047) return (d[51:0] != '0) ? 32'h7FC0_0000 : {s, 8'hFF, 23'b0};
    if (e == 0) begin
      if (d[51:0] == '0) return {s, 31'b0};
      m = {12'b0, d[51:0]};
      e = 1;
    end else begin
      m = {11'b0, 1'b1, d[51:0]};
    end
    ef = e - 1023 + 127;
    sh = (ef >= 1) ? 29 : 29 + 1 - ef;
    if (sh >= 60) begin
      q = 0; rem = 1; half = 64'h4000_0000_0000_0000;  // rem is tiny, non-zero
    end else begin
      q    = m >> sh;
      rem  = m & ((64'd1 << sh) - 1);
      half = 64'd1 << (sh - 1);
    end
    case (rm)
      2'd0:    inc = (rem > half) || (rem == half && q[0]);
      2'd1:    inc = !s && rem != 0;
      2'd2:    inc =  s && rem != 0;
      default: inc = 1'b0;
    endcase
    q    = q + longint'(inc);
    e    = (ef >= 1) ? ef - 1 : 0;
    bits = (longint'(e) << 23) + q;
    if ((bits >> 23) >= 255) begin
      if (rm == 2'd0 || (rm == 2'd1 && !s) || (rm == 2'd2 && s))
        return {s, 8'hFF, 23'b0};
      return {s, 8'hFE, 23'h7F_FFFF};
    end
    return {s, bits[30:0]};
  endfunction

  // The same two conversions for a format of ew exponent and fw fraction bits
  // (a word of 1+ew+fw <= 32 bits, right-aligned in 32).
  function automatic real fmt_to_real(logic [31:0] f, int ew, int fw);
    int          bias, e;
    logic        s;
    logic [31:0] mask;
    longint      fr;
    real         v;
    bias = (1 << (ew - 1)) - 1;
    s    = f[ew + fw];
    e    = int'((f >> fw) & ((32'd1 << ew) - 1));
    mask = (32'd1 << fw) - 32'd1;
    fr   = {32'b0, f & mask};
    if (e == (1 << ew) - 1) begin
      if (fr != 0) return $bitstoreal(64'h7FF8_0000_0000_0000);
      return $bitstoreal({s, 11'h7FF, 52'b0});
    end
    if (e == 0) v = real'(fr) * (2.0 ** (1 - bias - fw));
    else        v = real'(fr + (longint'(1) << fw)) * (2.0 ** (e - bias - fw));
    return s ? -v : v;
  endfunction

  function automatic logic [31:0] dbl_to_fmt(real r, logic [1:0] rm, int ew, int fw);
    logic [63:0]     d;
    logic            s;
    int              e, ef, sh, bias, emax;
    longint unsigned m, q, rem, half, bits;
    logic            inc;
    logic [31:0]     sgn;
    bias = (1 << (ew - 1)) - 1;
    emax = (1 << ew) - 1;
    d = $realtobits(r);
    s = d[63];
    sgn = s ? (32'd1 << (ew + fw)) : 32'd0;
    e = int'(d[62:52]);
    if (e == 2047) begin
      if (d[51:0] != '0) return (32'(emax) << fw) | (32'd1 << (fw - 1));
      return sgn | (32'(emax) << fw);
    end
    if (e == 0) begin
      if (d[51:0] == '0) return sgn;
      m = {12'b0, d[51:0]};
      e = 1;
    end else begin
      m = {11'b0, 1'b1, d[51:0]};
    end
    ef = e - 1023 + bias;
    sh = (ef >= 1) ? 52 - fw : 52 - fw + 1 - ef;
    if (sh >= 60) begin
      q = 0; rem = 1; half = 64'h4000_0000_0000_0000;
    end else begin
      q    = m >> sh;
      rem  = m & ((64'd1 << sh) - 1);
      half = 64'd1 << (sh - 1);
    end
    case (rm)
      2'd0:    inc = (rem > half) || (rem == half && q[0]);
      2'd1:    inc = !s && rem != 0;
      2'd2:    inc =  s && rem != 0;
      default: inc = 1'b0;
    endcase
    q    = q + longint'(inc);
    e    = (ef >= 1) ? ef - 1 : 0;
    bits = (longint'(e) << fw) + q;
    if ((bits >> fw) >= longint'(emax)) begin
      if (rm == 2'd0 || (rm == 2'd1 && !s) || (rm == 2'd2 && s))
        return sgn | (32'(emax) << fw);
      return sgn | (32'(emax - 1) << fw) | ((32'd1 << fw) - 1);
    end
    return sgn | 32'(bits);
  endfunction

  function automatic logic [31:0] ref_mul_fmt(logic [31:0] a, logic [31:0] b, logic [1:0] rm,
                                              int ew, int fw);
    real x, y;
    x = fmt_to_real(a, ew, fw);
    y = fmt_to_real(b, ew, fw);
    if (x != x || y != y) return dbl_to_fmt($bitstoreal(64'h7FF8_0000_0000_0000), rm, ew, fw);
    return dbl_to_fmt(x * y, rm, ew, fw);
  endfunction

  // Class helpers.
  function automatic bit is_nan(logic [31:0] f);
    return f[30:23] == 8'hFF && f[22:0] != '0;
  endfunction
  function automatic bit is_inf(logic [31:0] f);
    return f[30:23] == 8'hFF && f[22:0] == '0;
  endfunction

  // Correctly rounded reference results (NaN results compare as any NaN).
  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b, logic [1:0] rm);
    if (is_nan(a) || is_nan(b)) return 32'h7FC0_0000;
    return dbl_to_flt(flt_to_real(a) * flt_to_real(b), rm);
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b, logic [1:0] rm);
    real s;
    if (is_nan(a) || is_nan(b)) return 32'h7FC0_0000;
    s = flt_to_real(a) + flt_to_real(b);
    // An exact zero sum of opposite signs is +0, or -0 when rounding down.
    if (s == 0.0 && !is_inf(a) && (a[31] != b[31] || a[30:0] != '0 || b[30:0] != '0))
      if (a[31] != b[31]) return (rm == 2'd2) ? 32'h8000_0000 : 32'h0000_0000;
    return dbl_to_flt(s, rm);
  endfunction

  // Random single-precision operand with its exponent field in [emin, emax].
  function automatic logic [31:0] rand_flt(int emin, int emax);
    logic [7:0] e;
    e = 8'(emin + int'($urandom_range(emax - emin)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction
endpackage
