// tb_approx_mult_8x8: end-to-end test of the approximate multiplier at its
// default configuration.
// Applies all 65536 operand pairs and checks each product against the
// reference model (amul_tb_pkg): a * b minus 2^k for every middle column k
// whose approximate compressor fires. It also checks p <= a * b, counts how
// often each mechanism occurred (exact result, approximation in each of the
// columns 5..9, several approximations at once) and fails if one never
// occurred. Finally it reports the accuracy figures usual for approximate
// multipliers: error rate, mean error distance, normalised mean error distance
// (MED / 65025), mean relative error distance and the largest error.
module tb_approx_mult_8x8;
  import amul_tb_pkg::*;

  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  approx_mult_8x8 dut (.a(a), .b(b), .p(p));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d p=%0d", what, a, b, p);
    end
  endtask

  initial begin
    int exact, err, n_exact, n_multi, max_err;
    longint sum_err;
    real sum_red, med, nmed, mred;
    int fired [MID_LO:MID_HI];
    logic [15:0] f;

    n_exact = 0; n_multi = 0; max_err = 0; sum_err = 0; sum_red = 0.0;
    for (int k = MID_LO; k <= MID_HI; k++) fired[k] = 0;

    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      #1;
      exact = int'(a) * int'(b);
      f     = fire_mask(a, b);
      check(p == approx_product(a, b), "product");
      check(int'(p) <= exact, "never above exact");
      err = exact - int'(p);
      if (err == 0) n_exact++;
      if ($countones(f) > 1) n_multi++;
      for (int k = MID_LO; k <= MID_HI; k++) fired[k] += int'(f[k]);
      sum_err += longint'(err);
      if (err > max_err) max_err = err;
      if (exact != 0) sum_red += real'(err) / real'(exact);
    end

    // mechanisms
    check(n_exact > 0, "some products exact");
    check(n_multi > 0, "several compressors erring at once");
    for (int k = MID_LO; k <= MID_HI; k++) begin
      $display("column %0d approximation occurred %0d times", k, fired[k]);
      checks++;
      if (fired[k] == 0) failures++;
    end

    // spot values: x = 25, y = 30 and x = 20, y = 20
    a = 8'd25; b = 8'd30; #1;
    check(p == approx_product(a, b), "25 x 30");
    $display("25 x 30 = %0d (exact 750)", p);
    a = 8'd20; b = 8'd20; #1;
    check(p == approx_product(a, b), "20 x 20");
    $display("20 x 20 = %0d (exact 400)", p);
    a = 8'd255; b = 8'd255; #1;
    check(p == approx_product(a, b), "255 x 255");
    $display("255 x 255 = %0d (exact 65025)", p);

    med  = real'(sum_err) / 65536.0;
    nmed = med / 65025.0;
    mred = sum_red / 65025.0;  // non-zero products: 255 * 255 pairs
    $display("exact products: %0d of 65536 (error rate %0.2f %%)", n_exact,
             100.0 * real'(65536 - n_exact) / 65536.0);
    $display("MED %0.3f  NMED %0.4f %%  MRED %0.4f %%  max error %0d",
             med, 100.0 * nmed, 100.0 * mred, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
