// tb_sign_xor: checks the product sign for all four sign pairs (the product is
// negative when exactly one operand is). Self-checking; prints TB_RESULT.
module tb_sign_xor;
  logic a_s = 1'b0, b_s = 1'b0, c_s;
  int checks = 0, failures = 0;

  sign_xor dut (.a_s, .b_s, .c_s);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      a_s = i[0]; b_s = i[1];
      #1;
      checks++;
      if (c_s != ((i == 1) || (i == 2))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
