// sign_calc: sign of the product. The result is negative exactly when one,
// and only one, of the operands is negative, so the sign is the XOR of the
// two operand signs, as the design describes. Purely combinational.
module sign_calc (
  input  logic sign_a,
  input  logic sign_b,
  output logic sign_z
);
  assign sign_z = sign_a ^ sign_b;
endmodule
