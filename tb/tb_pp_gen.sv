// tb_pp_gen: exhaustive test of the partial-product generator.
// For every pair of 8-bit operands checks the 64 bits pp[i][j] = a[j] & b[i],
// and that the weighted sum of the matrix equals a * b.
module tb_pp_gen
  import amul_pkg::*;
;
  logic [N-1:0] a, b;
  pp_mat_t      pp;
  int checks = 0, failures = 0;

  pp_gen dut (.a(a), .b(b), .pp(pp));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wsum;
    bit ok;
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      #1;
      ok   = 1'b1;
      wsum = 0;
      for (int i = 0; i < N; i++) begin
        for (int j = 0; j < N; j++) begin
          if (pp[i][j] != (a[j] && b[i])) ok = 1'b0;
          if (pp[i][j]) wsum += 1 << (i + j);
        end
      end
      checks += 2;
      if (!ok) failures++;
      if (wsum != int'(a) * int'(b)) failures++;
      if (!ok || wsum != int'(a) * int'(b)) $display("FAIL a=%0d b=%0d", a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
