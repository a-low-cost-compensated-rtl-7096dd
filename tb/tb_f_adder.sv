// tb_f_adder: exhaustive check of the unbiased fraction adder: every pair of
// 7-bit fractions must give A_f + B_f + 1, and bit 7 must be the Mitchell
// carry (xA + xB + 2^-7 >= 1). Self-checking; prints TB_RESULT.
module tb_f_adder;
  logic [6:0] a_f = '0, b_f = '0;
  logic [7:0] f_ma;
  int checks = 0, failures = 0;

  f_adder dut (.a_f, .b_f, .f_ma);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++)
      for (int j = 0; j < 128; j++) begin
        a_f = 7'(i); b_f = 7'(j);
        #1;
        checks += 2;
        if (int'(f_ma) != i + j + 1) begin
          failures++;
          if (failures < 10) $display("FAIL %0d+%0d+1 got %0d", i, j, f_ma);
        end
        if (f_ma[7] != (i + j + 1 >= 128)) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
