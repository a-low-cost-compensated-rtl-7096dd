// tb_bias127_unit: drives every exponent sum 0..510 with range 0 and 1 and
// each zero/inf flag combination, and compares C_e and flush with the rules:
// zero -> 0 and flush; inf -> FFh; sum+range < 127 -> 0 and flush;
// sum+range-127 > 255 -> FFh; else sum+range-127. Counts how often underflow
// and overflow occur. Self-checking; prints TB_RESULT.
module tb_bias127_unit;
  logic [8:0] e_sum = '0;
  logic range_i = 1'b0, zero = 1'b0, inf = 1'b0;
  logic [7:0] c_e;
  logic flush;
  int checks = 0, failures = 0, n_under = 0, n_over = 0;

  bias127_unit dut (.e_sum, .range_i, .zero, .inf, .c_e, .flush);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, ee, ef;
    for (int s = 0; s <= 510; s++)
      for (int r = 0; r < 2; r++)
        for (int z = 0; z < 2; z++)
          for (int f = 0; f < 2; f++) begin
            e_sum = 9'(s); range_i = r[0]; zero = z[0]; inf = f[0];
            #1;
            t = s + r - 127;
            if (z)             begin ee = 0;   ef = 1; end
            else if (f)        begin ee = 255; ef = 0; end
            else if (t < 0)    begin ee = 0;   ef = 1; n_under++; end
            else if (t > 255)  begin ee = 255; ef = 0; n_over++; end
            else               begin ee = t;   ef = 0; end
            checks += 2;
            if (int'(c_e) != ee) begin
              failures++;
              if (failures < 10) $display("FAIL s=%0d r=%0d z=%0d i=%0d c_e=%0d exp %0d", s, r, z, f, c_e, ee);
            end
            if (int'(flush) != ef) failures++;
          end
    checks++;
    if (n_under == 0 || n_over == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
