// special_detect: zero and infinite-number detectors.
//
// Mitchell's scheme cannot produce a zero by itself (its significand is never
// below 1), so operands that are zero must be caught separately; likewise
// infinite operands. bfloat16 processing flushes subnormals, so an exponent
// field of 00h means zero and FFh means infinite (NaN is not told apart).
// Ports: a_e, b_e (8) -> zero, inf. Combinational.
// The detectors are required by the design but not drawn; the plain exponent
// compares are this design's choice.
module special_detect
  import bf16_mul_pkg::*;
(
  input  logic [EXP_W-1:0] a_e,
  input  logic [EXP_W-1:0] b_e,
  output logic             zero,
  output logic             inf
);
  always_comb begin
    zero = (a_e == '0) || (b_e == '0);
    inf  = (a_e == EXP_INF) || (b_e == EXP_INF);
  end
endmodule
