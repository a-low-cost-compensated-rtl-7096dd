// f_adder: first-stage (Mitchell) fraction adder.
//
// In the log domain a significand 1+x has log2 ~= x, so Mitchell's
// approximation of (1+xA)(1+xB) starts from xA + xB. This adder forms
// f_ma = A_f + B_f + 1: the constant carry-in of one LSB (2^-7) is the
// unbiasing term that pulls the mean error of truncated fractions towards
// zero. Bit 7 of f_ma is the carry (xA + xB + 2^-7 >= 1) that selects between
// the two Mitchell cases downstream.
// Ports: a_f, b_f (7 bits) -> f_ma (8 bits). Combinational.
// The unbiased carry-in and the widths follow the design; nothing here is an
// own choice.
module f_adder
  import bf16_mul_pkg::*;
(
  input  logic [FRAC_W-1:0] a_f,
  input  logic [FRAC_W-1:0] b_f,
  output logic [FRAC_W:0]   f_ma
);
  localparam logic UNBIAS_CIN = 1'b1;
  always_comb f_ma = {1'b0, a_f} + {1'b0, b_f} + {{FRAC_W{1'b0}}, UNBIAS_CIN};
endmodule
