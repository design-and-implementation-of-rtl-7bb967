// tb_fp_normalizer: products with the leading one at every position (48-bit
// instance) and sums at every position (28-bit instance). The expected result
// is worked out from the position of the leading one found with $clog2: the
// value shifted so that this one lands on the top bit, the exponent moved by
// the same amount, and the sticky bit the OR of everything below the round bit.
module tb_fp_normalizer;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [47:0]       p48;
  logic [27:0]       p28;
  logic signed [10:0] e48, e28, en48, en28;
  logic [26:0]       s48, s28;
  logic              z48, z28;

  fp_normalizer dut48 (.sig(p48), .exp_in(e48), .sig_n(s48), .exp_n(en48), .zero(z48));
  fp_normalizer #(.IN_W(28), .OUT_W(27), .XW(11)) dut28 (.sig(p28), .exp_in(e28), .sig_n(s28), .exp_n(en28), .zero(z28));

  task automatic check48(input logic [47:0] p, input int e);
    int msb;
    logic [47:0] sh;
    logic [26:0] want;
    p48 = p; e48 = 11'(e);
    #1;
    checks++;
    if (p == 0) begin
      if (!z48) begin failures++; $display("48: zero missed"); end
      return;
    end
    msb  = $clog2(longint'(p) + 1) - 1;
    sh   = p << (47 - msb);
    want = {sh[47:22], sh[21:0] != 0};
    if (z48 || s48 !== want || int'(en48) != e + msb - 46) begin
      failures++; $display("48: %h e=%0d -> %h %0d, want %h %0d", p, e, s48, en48, want, e + msb - 46);
    end
  endtask

  task automatic check28(input logic [27:0] p, input int e);
    int msb;
    logic [27:0] sh;
    logic [26:0] want;
    p28 = p; e28 = 11'(e);
    #1;
    checks++;
    if (p == 0) begin
      if (!z28) begin failures++; $display("28: zero missed"); end
      return;
    end
    msb  = $clog2(longint'(p) + 1) - 1;
    sh   = p << (27 - msb);
    want = {sh[27:2], sh[1:0] != 0};
    if (z28 || s28 !== want || int'(en28) != e + msb - 26) begin
      failures++; $display("28: %h e=%0d -> %h %0d, want %h %0d", p, e, s28, en28, want, e + msb - 26);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check48(48'h5A40_0000_0000, 131 + 130 - 127);
    check48('0, 10); check28('0, 10);
    for (int n = 0; n < 4000; n++) begin
      int pos;
      logic [47:0] r;
      pos = int'($urandom_range(47));
      r   = {16'($urandom), 32'($urandom)};
      check48((r & ((48'd1 << pos) - 1)) | (48'd1 << pos), int'($urandom_range(300)) - 100);
      pos = int'($urandom_range(27));
      check28(28'((r & ((48'd1 << pos) - 1)) | (48'd1 << pos)), int'($urandom_range(255)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
