// fixed_width_mult: second-stage truncated exact multiplier, 7-bit output.
//
// Takes the two 7-bit error terms, keeps only their NP most significant bits
// (A'_f = A_ef[6:7-NP], weights 2^-1..2^-NP; the dropped n - n' bits are the
// "truncator", which is bit selection only), multiplies them exactly into a
// 2*NP-bit C_mul and keeps the seven bits of weight 2^-1..2^-7:
// C(2)_f = C_mul[2NP-1 : 2NP-7]. The 2NP-7 lower bits are dropped
// (truncation, no rounding). C(2)_f is the compensation added to the
// Mitchell result.
// Ports: a_ef, b_ef (7) -> c2 (7). Combinational.
// The bit slices follow the design. For NP <= 3 the product has fewer than
// seven bits; it is then shifted up by 7 - 2NP so that C(2)_f keeps the same
// weight (this design's choice), and for NP = 0 the output is zero.
module fixed_width_mult
  import bf16_mul_pkg::*;
#(
  parameter int unsigned NP = 5,
  localparam int unsigned TW = (NP == 0) ? 1 : NP
)(
  input  logic [FRAC_W-1:0] a_ef,
  input  logic [FRAC_W-1:0] b_ef,
  output logic [FRAC_W-1:0] c2
);
  if (NP > FRAC_W) begin : g_bad
    $error("fixed_width_mult: NP must be 0..7");
  end

  logic [TW-1:0]   a_t, b_t;   // truncated error terms A'_f, B'_f
  logic [2*TW-1:0] c_mul;

  always_comb begin
    a_t   = a_ef[FRAC_W-1 -: TW];
    b_t   = b_ef[FRAC_W-1 -: TW];
    c_mul = a_t * b_t;
  end

  if (NP == 0) begin : g_none
    always_comb c2 = '0;
  end else if (2 * NP >= FRAC_W) begin : g_trunc
    always_comb c2 = c_mul[2*NP-1 -: FRAC_W];
  end else begin : g_pad
    always_comb c2 = {c_mul, {(FRAC_W - 2*NP){1'b0}}};
  end
endmodule
