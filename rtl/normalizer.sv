// normalizer: turns C(1,2)_f into the FP32 fraction and the range bit.
//
// C(1,2)_f is a significand in [1, 4) with the binary point after bit 7.
// If it is >= 2 (bit 8 set), bit 8 is the hidden one, the fraction is
// {c12[7:0], 15'b0} and range = 1 (exponent + 1). Otherwise bit 7 is the
// hidden one (it is always set: C(1)_f >= 128), the fraction is
// {c12[6:0], 16'b0} and range = 0. The low FP32 bits are zero-filled: the
// approximate significand has only 8 fraction bits, so nothing is rounded.
// Ports: c12 (9) -> frac (23), range_o (1). Combinational. Follows the design.
module normalizer
  import bf16_mul_pkg::*;
(
  input  logic [SIG_W-1:0]   c12,
  output logic [FP32_FW-1:0] frac,
  output logic               range_o
);
  always_comb begin
    range_o = c12[SIG_W-1];
    if (range_o) frac = {c12[SIG_W-2:0], {(FP32_FW - SIG_W + 1){1'b0}}};
    else         frac = {c12[SIG_W-3:0], {(FP32_FW - SIG_W + 2){1'b0}}};
  end
endmodule
