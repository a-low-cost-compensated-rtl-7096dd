// e_adder: exponent adder of the compensated bfloat16 multiplier.
//
// Adds the two biased 8-bit operand exponents into a 9-bit sum that keeps the
// carry; the bias is removed later by bias127_unit. Combinational.
// Ports: a_e, b_e (8 bits each) -> sum (9 bits).
// The widths 8, 8 and 9 are the design's; the plain adder is the simplest
// circuit that does the job.
module e_adder
  import bf16_mul_pkg::*;
(
  input  logic [EXP_W-1:0] a_e,
  input  logic [EXP_W-1:0] b_e,
  output logic [EXP_W:0]   sum
);
  always_comb sum = {1'b0, a_e} + {1'b0, b_e};
endmodule
