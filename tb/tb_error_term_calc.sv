// tb_error_term_calc: exhaustive check of the error-term selector. With
// carry = 1 each output must equal 127 - x (1's complement of a 7-bit
// fraction), with carry = 0 it must equal x. Self-checking; prints TB_RESULT.
module tb_error_term_calc;
  logic [6:0] a_f = '0, b_f = '0, a_ef, b_ef;
  logic       carry = 1'b0;
  int checks = 0, failures = 0;

  error_term_calc dut (.a_f, .b_f, .carry, .a_ef, .b_ef);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb;
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < 128; i++)
        for (int j = 0; j < 128; j += 3) begin
          carry = c[0]; a_f = 7'(i); b_f = 7'(j);
          #1;
          ea = c ? 127 - i : i;
          eb = c ? 127 - j : j;
          checks += 2;
          if (int'(a_ef) != ea) failures++;
          if (int'(b_ef) != eb) failures++;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
