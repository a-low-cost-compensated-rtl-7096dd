// tb_normalizer: for every C(1,2)_f in [128, 511] checks that
// (1 + frac/2^23) * 2^range equals C(1,2)_f / 128 exactly and that range is
// set only for values >= 256. Self-checking; prints TB_RESULT.
module tb_normalizer;
  logic [8:0]  c12 = 9'd128;
  logic [22:0] frac;
  logic        range_o;
  int checks = 0, failures = 0;

  normalizer dut (.c12, .frac, .range_o);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint lhs, rhs;
    for (int v = 128; v < 512; v++) begin
      c12 = 9'(v);
      #1;
      // (2^23 + frac) * 2^range * 128 == v * 2^23
      lhs = (longint'(64'h80_0000) + longint'(frac)) * (range_o ? 2 : 1) * 128;
      rhs = longint'(v) * 64'h80_0000;
      checks += 2;
      if (lhs != rhs) begin
        failures++;
        if (failures < 10) $display("FAIL v=%0d frac=%h range=%0d", v, frac, range_o);
      end
      if (range_o != (v >= 256)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
