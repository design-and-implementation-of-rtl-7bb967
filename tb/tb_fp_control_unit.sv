// tb_fp_control_unit: every pair of operand classes (normal, zero, +-infinity,
// NaN) with a recognisable datapath word; checks the override rules of a
// product: NaN in or 0 x inf gives NaN (the latter flagged invalid), inf
// gives a signed infinity, zero gives a signed zero, anything else passes the
// datapath word and its flags through.
module tb_fp_control_unit;
  import fp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b, dp_z, z;
  logic        sign_z, is_nan, is_inf, is_zero;
  fp_flags_t   dp_flags, flags;

  fp_control_unit dut (.a, .b, .sign_z, .dp_z, .dp_flags, .z, .flags, .is_nan, .is_inf, .is_zero);

  // class: 0 normal, 1 zero, 2 infinity, 3 NaN
  function automatic logic [31:0] make(int cls, logic s);
    case (cls)
      0:       return {s, 8'd100, 23'h12345};
      1:       return {s, 31'b0};
      2:       return {s, 8'hFF, 23'b0};
      default: return {s, 8'hFF, 23'h400001};
    endcase
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ca = 0; ca < 4; ca++)
      for (int cb = 0; cb < 4; cb++)
        for (int s = 0; s < 4; s++) begin
          logic [31:0] want;
          fp_flags_t   wf;
          logic        sz;
          a = make(ca, s[1]); b = make(cb, s[0]);
          sz = s[1] ^ s[0];
          sign_z = sz;
          dp_z = 32'h1234_5678; dp_flags = 4'b0111;
          #1;
          wf = '0;
          if (ca == 3 || cb == 3)                               want = 32'h7FC0_0000;
          else if ((ca == 1 && cb == 2) || (ca == 2 && cb == 1)) begin want = 32'h7FC0_0000; wf.invalid = 1; end
          else if (ca == 2 || cb == 2)                          want = {sz, 8'hFF, 23'b0};
          else if (ca == 1 || cb == 1)                          want = {sz, 31'b0};
          else begin                                            want = dp_z; wf = dp_flags; end
          checks++;
          if (z !== want || flags !== wf
              || is_nan !== (want == 32'h7FC0_0000)
              || is_inf !== (want[30:0] == 31'h7F80_0000)
              || is_zero !== (want[30:0] == 31'b0)) begin
            failures++;
            $display("classes %0d %0d: got %h %b, want %h %b", ca, cb, z, flags, want, wf);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
