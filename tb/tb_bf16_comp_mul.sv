// tb_bf16_comp_mul: end-to-end test of the compensated bfloat16 multiplier at
// its default parameters (NP = 5).
//
// 1. Every pair of 7-bit fractions (16384 pairs), with random signs and
//    random in-range exponents, is compared bit for bit with a reference
//    written directly from the two-stage formulas:
//      no carry: S*128 = 128 + a + b + 1 + trunc7((a>>2)*(b>>2))
//      carry:    S*128 = 2(a + b + 1) + trunc7(((127-a)>>2)*((127-b)>>2))
//    with exponent A_e + B_e - 127 (+1 when S >= 2).
// 2. Over the same pairs the relative error of the significand product is
//    measured against the exact product: worst case must be 0.980 % and the
//    mean 0.048 %, the figures published for n' = 5.
// 3. Directed and random special cases: zero operands (also 0 x inf),
//    infinite operands, exponent overflow (saturates to FFh) and underflow
//    (flushed to zero).
// Each mechanism (Mitchell carry / no carry, range = 1 / 0, nonzero
// compensation, zero, infinity, overflow, underflow) is counted and must
// occur at least once. Self-checking; prints TB_RESULT.
module tb_bf16_comp_mul;
  import bf16_mul_pkg::*;

  bf16_t a, b;
  fp32_t c;
  int checks = 0, failures = 0;
  int n_carry = 0, n_nocarry = 0, n_range1 = 0, n_range0 = 0, n_comp = 0;
  int n_zero = 0, n_inf = 0, n_over = 0, n_under = 0;

  bf16_comp_mul dut (.a, .b, .c);

  initial begin : watchdog
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference significand times 128 for NP = 5.
  function automatic int ref_sig(int fa, int fb);
    int comp;
    if (fa + fb + 1 >= 128) begin
      comp = (((127 - fa) / 4) * ((127 - fb) / 4) * 128) / 1024;
      return 2 * (fa + fb + 1) + comp;
    end else begin
      comp = ((fa / 4) * (fb / 4) * 128) / 1024;
      return 128 + fa + fb + 1 + comp;
    end
  endfunction

  function automatic fp32_t ref_mul(bf16_t x, bf16_t y);
    fp32_t r;
    int s, t;
    s = ref_sig(int'(x.f), int'(y.f));
    t = int'(x.e) + int'(y.e) + (s >= 256 ? 1 : 0) - 127;
    r.s = x.s ^ y.s;
    r.f = (s >= 256) ? {8'(s), 15'b0} : {7'(s), 16'b0};
    if (x.e == 8'h00 || y.e == 8'h00) begin r.e = 8'h00; r.f = '0; end
    else if (x.e == 8'hFF || y.e == 8'hFF) r.e = 8'hFF;
    else if (t < 0) begin r.e = 8'h00; r.f = '0; end
    else if (t > 255) r.e = 8'hFF;
    else r.e = 8'(t);
    return r;
  endfunction

  task automatic check(input string what);
    fp32_t e;
    #1;
    e = ref_mul(a, b);
    checks++;
    if (c !== e) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: a=%h b=%h got %h expected %h", what, a, b, c, e);
    end
  endtask

  function automatic bf16_t rnd_normal(int emin, int emax);
    bf16_t r;
    r.s = 1'($urandom);
    r.e = 8'(emin + int'($urandom % 32'(emax - emin + 1)));
    r.f = 7'($urandom);
    return r;
  endfunction

  real exact, appr, rerr, worst = 0.0, sum = 0.0;

  initial begin

    // 1 + 2: all fraction pairs
    for (int fa = 0; fa < 128; fa++)
      for (int fb = 0; fb < 128; fb++) begin
        a = rnd_normal(64, 190); b = rnd_normal(64, 190);
        a.f = 7'(fa); b.f = 7'(fb);
        check("fractions");
        if (fa + fb + 1 >= 128) n_carry++; else n_nocarry++;
        if (ref_sig(fa, fb) >= 256) n_range1++; else n_range0++;
        if (ref_sig(fa, fb) != ((fa + fb + 1 >= 128) ? 2 * (fa + fb + 1) : 129 + fa + fb)) n_comp++;
        // significand of the DUT output, exponents removed
        appr  = (1.0 + real'(c.f) / 8388608.0);
        if (int'(c.e) - int'(a.e) - int'(b.e) + 127 == 1) appr = 2.0 * appr;
        exact = (1.0 + fa / 128.0) * (1.0 + fb / 128.0);
        rerr  = (exact - appr) / exact;
        sum  += rerr;
        if ((rerr < 0 ? -rerr : rerr) > (worst < 0 ? -worst : worst)) worst = rerr;
      end
    $display("NP=5: worst rerr = %0.4f %%, mean rerr = %0.4f %%", 100.0 * worst, 100.0 * sum / 16384.0);
    checks += 2;
    if (100.0 * worst < 0.9795 || 100.0 * worst > 0.9805) failures++;
    if (100.0 * sum / 16384.0 < 0.0475 || 100.0 * sum / 16384.0 > 0.0485) failures++;

    // 3: special cases
    for (int k = 0; k < 2000; k++) begin
      a = rnd_normal(1, 254); b = rnd_normal(1, 254);
      case (k % 4)
        0: begin a.e = 8'h00; n_zero++; end
        1: begin b.e = 8'hFF; n_inf++; end
        2: ;
        3: begin a.e = 8'h00; b.e = 8'hFF; n_zero++; end  // 0 x inf -> 0
      endcase
      check("special");
      if (k % 4 == 2) begin
        if (int'(a.e) + int'(b.e) < 126) n_under++;
        if (int'(a.e) + int'(b.e) > 382) n_over++;
      end
    end
    // directed edges: smallest and largest normal results
    a = '{s: 0, e: 8'd63,  f: 7'd0};  b = '{s: 0, e: 8'd64,  f: 7'd0};   check("min exponent 0");   // 63+64-127 = 0
    a = '{s: 0, e: 8'd64,  f: 7'd0};  b = '{s: 0, e: 8'd64,  f: 7'd0};   check("exponent 1");
    a = '{s: 1, e: 8'd190, f: 7'h7F}; b = '{s: 0, e: 8'd192, f: 7'h7F}; check("exponent 256 -> FF"); n_over++;
    a = '{s: 0, e: 8'd127, f: 7'h40}; b = '{s: 1, e: 8'd127, f: 7'h40}; check("1.5 x -1.5");
    checks++;
    if (c.s != 1'b1 || c.e != 8'd128) failures++;      // -2.25 -> exponent 128

    $display("mechanisms: carry=%0d nocarry=%0d range1=%0d range0=%0d comp=%0d zero=%0d inf=%0d over=%0d under=%0d",
             n_carry, n_nocarry, n_range1, n_range0, n_comp, n_zero, n_inf, n_over, n_under);
    checks += 9;
    if (n_carry == 0)   failures++;
    if (n_nocarry == 0) failures++;
    if (n_range1 == 0)  failures++;
    if (n_range0 == 0)  failures++;
    if (n_comp == 0)    failures++;
    if (n_zero == 0)    failures++;
    if (n_inf == 0)     failures++;
    if (n_over == 0)    failures++;
    if (n_under == 0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
