// tb_fixed_width_mult: exhaustive check of the second-stage truncated
// multiplier over all pairs of 7-bit error terms for NP = 5 (default), 4, 7
// and 2. The expected value is floor((a >> (7-NP)) * (b >> (7-NP)) * 2^7 /
// 2^(2NP)): the exact product of the two NP-bit truncated terms, cut to 7
// fraction bits. Self-checking; prints TB_RESULT.
module tb_fixed_width_mult;
  logic [6:0] a_ef = '0, b_ef = '0;
  logic [6:0] c5, c4, c7, c2;
  int checks = 0, failures = 0;

  fixed_width_mult           dut5 (.a_ef, .b_ef, .c2(c5));
  fixed_width_mult #(.NP(4)) dut4 (.a_ef, .b_ef, .c2(c4));
  fixed_width_mult #(.NP(7)) dut7 (.a_ef, .b_ef, .c2(c7));
  fixed_width_mult #(.NP(2)) dut2 (.a_ef, .b_ef, .c2(c2));

  function automatic int ref_c2(int a, int b, int np);
    int at, bt;
    at = a / (1 << (7 - np));
    bt = b / (1 << (7 - np));
    return (at * bt * 128) / (1 << (2 * np));
  endfunction

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
        a_ef = 7'(i); b_ef = 7'(j);
        #1;
        checks += 4;
        if (int'(c5) != ref_c2(i, j, 5)) begin
          failures++;
          if (failures < 10) $display("FAIL NP=5 %0d*%0d got %0d exp %0d", i, j, c5, ref_c2(i, j, 5));
        end
        if (int'(c4) != ref_c2(i, j, 4)) failures++;
        if (int'(c7) != ref_c2(i, j, 7)) failures++;
        if (int'(c2) != ref_c2(i, j, 2)) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
