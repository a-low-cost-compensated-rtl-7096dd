// left_shifter_1b: builds the first-stage significand C(1)_f.
//
// The seven low bits of f_ma get a constant 1 above them, giving {1, f_ma[6:0]}.
// If the fraction adder carried (xA + xB + 2^-7 >= 1) this word is shifted
// left by one, which equals 2*f_ma: significand 2*(xA + xB + 2^-7), i.e. the
// exponent grows by one. Otherwise it is zero-extended, which equals
// 2^7 + f_ma: significand 1 + xA + xB + 2^-7.
// C(1)_f is 9 bits with the binary point after bit 7 (value c1 / 128).
// Ports: low (7), carry (1) -> c1 (9). Combinational. Follows the design.
module left_shifter_1b
  import bf16_mul_pkg::*;
(
  input  logic [FRAC_W-1:0] low,
  input  logic              carry,
  output logic [SIG_W-1:0]  c1
);
  logic [FRAC_W:0] word;
  always_comb begin
    word = {1'b1, low};
    c1   = carry ? {word, 1'b0} : {1'b0, word};
  end
endmodule
