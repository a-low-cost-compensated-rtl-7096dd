// sign_xor: sign of the product, C_s = A_s XOR B_s. Combinational.
// Ports: a_s, b_s -> c_s. Follows the design.
module sign_xor (
  input  logic a_s,
  input  logic b_s,
  output logic c_s
);
  always_comb c_s = a_s ^ b_s;
endmodule
