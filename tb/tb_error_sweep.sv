// tb_error_sweep: error analysis of the multiplier over n' = NP = 0..7.
//
// One multiplier per NP value is fed every pair of 7-bit fractions (all
// significand combinations, operands in the normal range). For each NP the
// worst-case and mean relative error of the significand product,
// (exact - approx) / exact, are printed and compared with the published
// values: worst 10.65 % for NP = 0 and 1 (no compensation: unbiased Mitchell),
// 2.25 % for NP = 4, 0.980 % for NP = 5 and -0.781 % for NP = 6 and 7; mean
// 0.408 % for NP = 4 and 0.048 % for NP = 5. The worst case must also grow as
// NP falls, and NP = 0 and 1 must give identical results. Self-checking;
// prints TB_RESULT.
module tb_error_sweep;
  import bf16_mul_pkg::*;

  bf16_t a, b;
  fp32_t c [8];
  int checks = 0, failures = 0;
  real worst [8], sum [8];
  real exact, appr, rerr;

  for (genvar g = 0; g < 8; g++) begin : g_np
    bf16_comp_mul #(.NP(g)) dut (.a, .b, .c(c[g]));
  end

  initial begin : watchdog
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(real x);
    return x < 0.0 ? -x : x;
  endfunction

  task automatic expect_near(string what, real got, real want, real tol);
    checks++;
    if (absr(got - want) > tol) begin
      failures++;
      $display("FAIL %s: %0.4f %% expected %0.4f %%", what, got, want);
    end
  endtask

  initial begin
    for (int k = 0; k < 8; k++) begin worst[k] = 0.0; sum[k] = 0.0; end
    a = '{s: 0, e: 8'd127, f: 7'd0};
    b = '{s: 0, e: 8'd127, f: 7'd0};
    for (int fa = 0; fa < 128; fa++)
      for (int fb = 0; fb < 128; fb++) begin
        a.f = 7'(fa); b.f = 7'(fb);
        #1;
        exact = (1.0 + fa / 128.0) * (1.0 + fb / 128.0);
        for (int k = 0; k < 8; k++) begin
          appr = 1.0 + real'(c[k].f) / 8388608.0;
          if (c[k].e == 8'd128) appr = 2.0 * appr;
          rerr = 100.0 * (exact - appr) / exact;
          sum[k] += rerr;
          if (absr(rerr) > absr(worst[k])) worst[k] = rerr;
        end
        checks++;
        if (c[0] != c[1]) failures++;
      end
    for (int k = 0; k < 8; k++)
      $display("NP=%0d  worst rerr %8.3f %%  mean rerr %7.3f %%", k, worst[k], sum[k] / 16384.0);
    expect_near("worst NP=0", worst[0], 10.65, 0.005);
    expect_near("worst NP=1", worst[1], 10.65, 0.005);
    expect_near("worst NP=4", worst[4], 2.25, 0.005);
    expect_near("worst NP=5", worst[5], 0.980, 0.0005);
    expect_near("worst NP=6", worst[6], -0.781, 0.0005);
    expect_near("worst NP=7", worst[7], -0.781, 0.0005);
    expect_near("mean NP=4", sum[4] / 16384.0, 0.408, 0.0015);
    expect_near("mean NP=5", sum[5] / 16384.0, 0.048, 0.0005);
    for (int k = 1; k < 6; k++) begin
      checks++;
      if (!(worst[k] > worst[k+1])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
