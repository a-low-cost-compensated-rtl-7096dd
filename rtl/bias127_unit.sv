// bias127_unit: FP32 exponent of the product.
//
// t = A_e + B_e + range - 127, computed on 10 bits so that both underflow
// (A_e + B_e + range < 127) and overflow (t > FFh) are visible. In order of
// priority:
//   zero operand      -> C_e = 00h and flush = 1 (fraction cleared)
//   infinite operand  -> C_e = FFh
//   underflow         -> C_e = 00h and flush = 1 (subnormals are flushed)
//   t > FFh           -> C_e = FFh (overflow saturates)
//   otherwise         -> C_e = t
// Ports: e_sum (9), range_i, zero, inf -> c_e (8), flush. Combinational.
// The priorities, the bias and the clamp follow the design. Clearing the
// fraction on underflow is this design's reading of "subnormal outputs are
// flushed"; on infinity/overflow the fraction is left as computed, because the
// design only defines the exponent there.
module bias127_unit
  import bf16_mul_pkg::*;
(
  input  logic [EXP_W:0]   e_sum,
  input  logic             range_i,
  input  logic             zero,
  input  logic             inf,
  output logic [EXP_W-1:0] c_e,
  output logic             flush
);
  logic [EXP_W+1:0] biased;   // A_e + B_e + range, up to 511
  always_comb begin
    biased = {1'b0, e_sum} + {{(EXP_W+1){1'b0}}, range_i};
    flush  = 1'b0;
    c_e    = '0;
    if (zero) begin
      flush = 1'b1;
    end else if (inf) begin
      c_e = EXP_INF;
    end else if (biased < {2'b00, EXP_BIAS}) begin
      flush = 1'b1;
    end else if (biased - {2'b00, EXP_BIAS} > {2'b00, EXP_INF}) begin
      c_e = EXP_INF;
    end else begin
      c_e = 8'(biased - {2'b00, EXP_BIAS});
    end
  end
endmodule
