// error_term_calc: first-stage error terms handed to the second stage.
//
// Mitchell's result misses exactly xA*xB when xA + xB < 1, and
// (1-xA)*(1-xB) when xA + xB >= 1. The terms passed on are therefore the
// fractions themselves, or their complements. The complement is taken as the
// 1's complement (bitwise NOT, i.e. 1 - x - 2^-7) rather than the 2's
// complement, which saves two adders at a cost of one LSB per term.
// Ports: a_f, b_f (7), carry (1, from f_adder) -> a_ef, b_ef (7). Combinational.
// Follows the design.
module error_term_calc
  import bf16_mul_pkg::*;
(
  input  logic [FRAC_W-1:0] a_f,
  input  logic [FRAC_W-1:0] b_f,
  input  logic              carry,
  output logic [FRAC_W-1:0] a_ef,
  output logic [FRAC_W-1:0] b_ef
);
  always_comb begin
    a_ef = carry ? ~a_f : a_f;
    b_ef = carry ? ~b_f : b_f;
  end
endmodule
