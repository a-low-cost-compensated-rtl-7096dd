// tb_e_adder: exhaustive check of the exponent adder over all 65536 exponent
// pairs against an integer sum. Self-checking; prints TB_RESULT.
module tb_e_adder;
  logic [7:0] a_e = '0, b_e = '0;
  logic [8:0] sum;
  int checks = 0, failures = 0;

  e_adder dut (.a_e, .b_e, .sum);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a_e = 8'(i); b_e = 8'(j);
        #1;
        checks++;
        if (int'(sum) != i + j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d+%0d got %0d", i, j, sum);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
