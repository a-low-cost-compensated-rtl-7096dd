// tb_m_adder: checks the stage adder on every C(1)_f value the first stage can
// produce (128..255 and the even values 256..510) combined with C(2)_f values
// that keep the sum below 512, against an integer sum. Self-checking; prints
// TB_RESULT.
module tb_m_adder;
  logic [8:0] c1 = 9'd128, c12;
  logic [6:0] c2 = '0;
  int checks = 0, failures = 0;

  m_adder dut (.c1, .c2, .c12);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 128; x <= 510; x++) begin
      if (x >= 256 && x % 2 != 0) continue;
      for (int y = 0; y < 128; y += 5) begin
        if (x + y >= 512) continue;
        c1 = 9'(x); c2 = 7'(y);
        #1;
        checks++;
        if (int'(c12) != x + y) begin
          failures++;
          if (failures < 10) $display("FAIL %0d+%0d got %0d", x, y, c12);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
