// tb_conv_workload: a small convolution run through the multiplier, the way a
// CNN layer would use it: bfloat16 activations and weights, products in FP32,
// sums accumulated in floating point outside the multiplier.
//
// Two layer shapes are run with random data: a 3x3 convolution over 16 input
// channels (144 products per output) and a 1x1 pointwise convolution over 8
// input channels (8 products per output, the short accumulations that hurt
// MobileNet-style layers most). For every product the relative error must stay
// within the 0.98 % worst case of NP = 5, and for every output the error of
// the accumulated sum must stay within 0.98 % of the sum of |products|.
// The mean signed product error is printed. Self-checking; prints TB_RESULT.
module tb_conv_workload;
  import bf16_mul_pkg::*;

  localparam int OUT_PIX = 16;   // 4 x 4 output pixels per layer shape

  bf16_t a, b;
  fp32_t c;
  int checks = 0, failures = 0, n_products = 0;
  real acc_appr, acc_exact, acc_abs, p_exact, p_appr, err_sum = 0.0;

  bf16_comp_mul dut (.a, .b, .c);

  initial begin : watchdog
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real bf16_val(bf16_t x);
    real v;
    v = (1.0 + real'(x.f) / 128.0) * (2.0 ** (real'(x.e) - 127.0));
    return x.s ? -v : v;
  endfunction

  function automatic real fp32_val(fp32_t x);
    real v;
    v = (1.0 + real'(x.f) / 8388608.0) * (2.0 ** (real'(x.e) - 127.0));
    return x.s ? -v : v;
  endfunction

  function automatic bf16_t rnd(bit positive, int emin, int emax);
    bf16_t r;
    r.s = positive ? 1'b0 : 1'($urandom);
    r.e = 8'(emin + int'($urandom % 32'(emax - emin + 1)));
    r.f = 7'($urandom);
    return r;
  endfunction

  task automatic run_layer(string name, int taps);
    real worst_out;
    worst_out = 0.0;
    for (int o = 0; o < OUT_PIX; o++) begin
      acc_appr = 0.0; acc_exact = 0.0; acc_abs = 0.0;
      for (int t = 0; t < taps; t++) begin
        a = rnd(1'b1, 120, 128);    // activation after ReLU
        b = rnd(1'b0, 118, 124);    // weight
        #1;
        p_exact = bf16_val(a) * bf16_val(b);
        p_appr  = fp32_val(c);
        checks++;
        if ((p_exact - p_appr) / p_exact > 0.00981 || (p_exact - p_appr) / p_exact < -0.00782) begin
          failures++;
          if (failures < 10) $display("FAIL product a=%h b=%h", a, b);
        end
        err_sum   += (p_exact - p_appr) / p_exact;
        n_products++;
        acc_appr  += p_appr;
        acc_exact += p_exact;
        acc_abs   += (p_exact < 0.0) ? -p_exact : p_exact;
      end
      checks++;
      if (((acc_exact - acc_appr) < 0.0 ? acc_appr - acc_exact : acc_exact - acc_appr) > 0.0098 * acc_abs)
        failures++;
      if ((acc_exact - acc_appr) / acc_abs > worst_out || (acc_appr - acc_exact) / acc_abs > worst_out)
        worst_out = ((acc_exact - acc_appr) < 0.0 ? acc_appr - acc_exact : acc_exact - acc_appr) / acc_abs;
    end
    $display("%s: %0d outputs x %0d products, worst |error| / sum|products| = %0.4f %%",
             name, OUT_PIX, taps, 100.0 * worst_out);
  endtask

  initial begin
    run_layer("3x3 conv, 16 channels", 3 * 3 * 16);
    run_layer("1x1 pointwise, 8 channels", 8);
    $display("mean signed product error over %0d products: %0.4f %%", n_products, 100.0 * err_sum / n_products);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
