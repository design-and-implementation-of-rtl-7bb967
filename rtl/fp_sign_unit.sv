// fp_sign_unit: sign calculation unit of the floating-point multiplier.
// The sign of a product is the exclusive OR of the operand signs; it is the
// same for every class of operand (zero, infinity, normal, denormal), so the
// control unit reuses it for its special results.
// The XOR rule is the published one.
// Interface: sign_a, sign_b in; sign_z out. Timing: combinational.
module fp_sign_unit (
  input  logic sign_a,
  input  logic sign_b,
  output logic sign_z
);
  assign sign_z = sign_a ^ sign_b;
endmodule
