// tb_pp_tree: exhaustive test of the compressor tree, pruned and exact.
// Feeds the partial-product matrix of every 8-bit operand pair into two trees:
//   * APPROX = 0: row_a + row_b must equal a * b exactly (checks the wiring of
//     every compressor, full adder and pass-through bit);
//   * APPROX = 1: row_a + row_b must equal the reference model of
//     amul_tb_pkg (a * b minus 2^k for each middle column k that fires).
// Counts, per middle column, how often its approximate compressor fired; a
// column that never fires is a failure.
module tb_pp_tree
  import amul_pkg::*;
  import amul_tb_pkg::*;
;
  logic [N-1:0] a, b;
  pp_mat_t      pp;
  prod_t        ra_a, rb_a, ra_e, rb_e;
  int checks = 0, failures = 0;
  int fired [MID_LO:MID_HI];

  always_comb for (int i = 0; i < N; i++) pp[i] = a & {N{b[i]}};

  pp_tree #(.APPROX(1'b1)) dut_a (.pp(pp), .row_a(ra_a), .row_b(rb_a));
  pp_tree #(.APPROX(1'b0)) dut_e (.pp(pp), .row_a(ra_e), .row_b(rb_e));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exact, expect_a, got_a, got_e, f;
    for (int k = MID_LO; k <= MID_HI; k++) fired[k] = 0;
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      #1;
      exact    = 16'(int'(a) * int'(b));
      expect_a = approx_product(a, b);
      f        = fire_mask(a, b);
      got_a    = ra_a + rb_a;
      got_e    = ra_e + rb_e;
      for (int k = MID_LO; k <= MID_HI; k++) fired[k] += int'(f[k]);
      checks += 2;
      if (got_e != exact) begin
        failures++;
        $display("FAIL exact tree a=%0d b=%0d: %0d, expected %0d", a, b, got_e, exact);
      end
      if (got_a != expect_a) begin
        failures++;
        $display("FAIL pruned tree a=%0d b=%0d: %0d, expected %0d", a, b, got_a, expect_a);
      end
    end
    for (int k = MID_LO; k <= MID_HI; k++) begin
      $display("column %0d: approximate compressor fired on %0d operand pairs", k, fired[k]);
      checks++;
      if (fired[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
