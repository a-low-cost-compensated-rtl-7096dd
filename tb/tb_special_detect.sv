// tb_special_detect: exhaustive check of the zero and infinite detectors over
// all exponent pairs. Self-checking; prints TB_RESULT.
module tb_special_detect;
  logic [7:0] a_e = '0, b_e = '0;
  logic zero, inf;
  int checks = 0, failures = 0;

  special_detect dut (.a_e, .b_e, .zero, .inf);

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
        checks += 2;
        if (zero != (i == 0 || j == 0)) failures++;
        if (inf != (i == 255 || j == 255)) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
