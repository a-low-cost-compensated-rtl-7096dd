// m_adder: adds the two stages.
//
// C(1,2)_f = C(1)_f + {2'b00, C(2)_f}. Both operands carry the binary point
// after bit 7, so the 7-bit compensation term lines up with the low bits of
// the 9-bit Mitchell significand in either Mitchell case. Nine bits are
// enough: with 1's-complement error terms the sum stays below 2^9 (the
// largest case, all-ones fractions, gives 510 + 0). An assertion guards this.
// Ports: c1 (9), c2 (7) -> c12 (9). Combinational. Follows the design.
module m_adder
  import bf16_mul_pkg::*;
(
  input  logic [SIG_W-1:0]  c1,
  input  logic [FRAC_W-1:0] c2,
  output logic [SIG_W-1:0]  c12
);
  logic [SIG_W:0] full;
  always_comb begin
    full = {1'b0, c1} + {{(SIG_W - FRAC_W + 1){1'b0}}, c2};
    c12  = full[SIG_W-1:0];
  end

  always_comb begin
    a_no_carry : assert (!full[SIG_W])
      else $error("m_adder: 9-bit sum overflowed (c1=%0d c2=%0d)", c1, c2);
  end
endmodule
