// tb_left_shifter_1b: exhaustive check of the first-stage significand former.
// For every f_ma = {carry, low} the output must be 2*f_ma when carry = 1 and
// 128 + f_ma when carry = 0. Self-checking; prints TB_RESULT.
module tb_left_shifter_1b;
  logic [6:0] low = '0;
  logic       carry = 1'b0;
  logic [8:0] c1;
  int checks = 0, failures = 0;

  left_shifter_1b dut (.low, .carry, .c1);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fma, exp_c1;
    for (fma = 0; fma < 256; fma++) begin
      carry = fma >= 128;
      low   = 7'(fma % 128);
      #1;
      exp_c1 = carry ? 2 * fma : 128 + fma;
      checks++;
      if (int'(c1) != exp_c1) begin
        failures++;
        $display("FAIL fma=%0d got %0d expected %0d", fma, c1, exp_c1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
