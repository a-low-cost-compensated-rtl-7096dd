// bf16_comp_mul: low-cost compensated approximate multiplier,
// bfloat16 x bfloat16 -> FP32.
//
// The significand product (1+xA)(1+xB) is approximated in two stages that
// need no leading-one detector, because floating-point significands are
// already normalised:
//   Stage 1 (unbiased Mitchell): f_ma = A_f + B_f + 1. Without carry the
//     significand is 1 + xA + xB (+2^-7); with carry it is 2(xA + xB) (+2^-6)
//     and the exponent grows by one.
//   Stage 2 (compensation): Mitchell misses xA*xB (no carry) or
//     (1-xA)(1-xB) (carry). Those error terms are formed with a 1's
//     complement, cut to their NP top bits, multiplied exactly and truncated
//     to 7 bits; the result is added to the stage-1 significand.
// The 9-bit sum is normalised into a 23-bit FP32 fraction; the exponent is
// A_e + B_e + range - 127 with zero/infinite detection, overflow saturation
// and underflow flush. The sign is A_s XOR B_s.
//
// Parameter NP (n', 0..7, default 5) trades area for accuracy: worst-case
// relative error of the significand product is 0.98 % at NP = 5 and 2.25 % at
// NP = 4 against 11.1 % for plain Mitchell.
// Ports: a, b (bfloat16, 16 bits) -> c (FP32, 32 bits). Fully combinational,
// no clock; register the ports outside if a pipeline stage is needed.
// Structure, widths and special-case rules follow the design; the default
// NP = 5, the separate zero/infinite detector and the flush on underflow are
// choices of this implementation.
module bf16_comp_mul
  import bf16_mul_pkg::*;
#(
  parameter int unsigned NP = 5
)(
  input  bf16_t a,
  input  bf16_t b,
  output fp32_t c
);
  logic [EXP_W:0]      e_sum;
  logic [FRAC_W:0]     f_ma;
  logic                carry;
  logic [SIG_W-1:0]    c1, c12;
  logic [FRAC_W-1:0]   a_ef, b_ef, c2;
  logic [FP32_FW-1:0]  frac;
  logic                range_n, zero, inf, flush;
  logic [EXP_W-1:0]    c_e;
  logic                c_s;

  // exponent path
  e_adder        u_e_adder (.a_e(a.e), .b_e(b.e), .sum(e_sum));
  special_detect u_detect  (.a_e(a.e), .b_e(b.e), .zero, .inf);
  bias127_unit   u_bias    (.e_sum, .range_i(range_n), .zero, .inf, .c_e, .flush);

  // stage 1: unbiased Mitchell
  f_adder         u_f_adder (.a_f(a.f), .b_f(b.f), .f_ma);
  assign carry = f_ma[FRAC_W];
  left_shifter_1b u_shift   (.low(f_ma[FRAC_W-1:0]), .carry, .c1);

  // stage 2: compensation
  error_term_calc  u_err   (.a_f(a.f), .b_f(b.f), .carry, .a_ef, .b_ef);
  fixed_width_mult #(.NP(NP)) u_fwm (.a_ef, .b_ef, .c2);

  // sum and normalise
  m_adder    u_m_adder (.c1, .c2, .c12);
  normalizer u_norm    (.c12, .frac, .range_o(range_n));

  sign_xor   u_sign    (.a_s(a.s), .b_s(b.s), .c_s);

  always_comb begin
    c.s = c_s;
    c.e = c_e;
    c.f = flush ? '0 : frac;
  end
endmodule
