// oh_exp_add - multiplier of two one-hot values.
//
// With both operands being signed powers of two, a product is again a signed
// power of two: its exponent is the sum of the operand exponents and its sign
// the exclusive-or of the operand signs. The product is zero, and flagged as
// such, when either operand is zero. This replaces the multipliers of a
// conventional fixed-point inner-product unit with a small adder (the "+"
// boxes feeding the histogram in the reduction unit of the design).
//
// Interface: operands in the code of ohn_pkg ({sign, exponent, nz});
// outputs the exponent sum (EW+1 bits), its sign and a non-zero flag.
// Timing: purely combinational.
module oh_exp_add #(
  parameter int unsigned EW = ohn_pkg::DADN_EW
) (
  input  logic [EW+1:0] w_code,   // weight code
  input  logic [EW+1:0] a_code,   // activation code
  output logic [EW:0]   p_exp,    // exponent of the product
  output logic          p_neg,    // product is negative
  output logic          p_nz      // product is non-zero
);

  always_comb begin
    p_exp = {1'b0, w_code[EW:1]} + {1'b0, a_code[EW:1]};
    p_neg = w_code[EW+1] ^ a_code[EW+1];
    p_nz  = w_code[0] & a_code[0];
  end

endmodule
