// bf16_mul_pkg: types and constants shared by the compensated approximate
// bfloat16 multiplier.
//
// bfloat16 has a sign, an 8-bit exponent biased by 127 and a 7-bit fraction;
// the product is delivered in FP32 (same sign and exponent layout, 23-bit
// fraction), so no precision is lost when the 9-bit internal significand is
// written out. These field layouts are the standard formats; FRAC_W = 7 is the
// n of the design's equations.
package bf16_mul_pkg;

  localparam int unsigned FRAC_W   = 7;          // n: bfloat16 fraction bits
  localparam int unsigned EXP_W    = 8;          // exponent bits (both formats)
  localparam int unsigned FP32_FW  = 23;         // FP32 fraction bits
  localparam int unsigned SIG_W    = FRAC_W + 2; // 9-bit internal significand, 2 integer bits
  localparam logic [EXP_W-1:0] EXP_BIAS = 8'h7F;
  localparam logic [EXP_W-1:0] EXP_INF  = 8'hFF;

  typedef struct packed {
    logic              s;
    logic [EXP_W-1:0]  e;
    logic [FRAC_W-1:0] f;
  } bf16_t;

  typedef struct packed {
    logic               s;
    logic [EXP_W-1:0]   e;
    logic [FP32_FW-1:0] f;
  } fp32_t;

endpackage
