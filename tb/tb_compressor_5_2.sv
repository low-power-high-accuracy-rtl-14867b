// tb_compressor_5_2: exhaustive test of the 5:2 compressor, pruned and exact.
// For all 128 input patterns:
//   * the exact version (APPROX = 0) gives sum + 2*(carry+cout1+cout2) equal
//     to the number of ones;
//   * the pruned version gives one less exactly when cin1 = 1 and x4 = x5;
//   * cout1 = majority(x1, x2, x3), and cout1/cout2 do not depend on cin2.
// Also applies the worked example x = 0,1,1,0,1, cin1 = cin2 = 1 (seven
// inputs, five ones). Counts how often the pruning changed the result.
module tb_compressor_5_2;
  logic [4:0] x;
  logic       cin1, cin2;
  logic       s_a, c_a, o1_a, o2_a;   // pruned
  logic       s_e, c_e, o1_e, o2_e;   // exact
  int checks = 0, failures = 0, fired = 0;

  compressor_5_2 #(.APPROX(1'b1)) dut_a (.x(x), .cin1(cin1), .cin2(cin2),
    .sum(s_a), .carry(c_a), .cout1(o1_a), .cout2(o2_a));
  compressor_5_2 #(.APPROX(1'b0)) dut_e (.x(x), .cin1(cin1), .cin2(cin2),
    .sum(s_e), .carry(c_e), .cout1(o1_e), .cout2(o2_e));

  function automatic int total(input logic s, c, o1, o2);
    return int'(s) + 2 * (int'(c) + int'(o1) + int'(o2));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%b cin1=%b cin2=%b", what, x, cin1, cin2);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic o1_prev, o2_prev;
    int ones, err;
    for (int v = 0; v < 64; v++) begin
      for (int c2 = 0; c2 < 2; c2++) begin
        {cin1, x} = 6'(v);
        cin2 = 1'(c2);
        #1;
        ones = $countones({x, cin1, cin2});
        err  = (cin1 && (x[3] == x[4])) ? 1 : 0;
        fired += err;
        check(total(s_e, c_e, o1_e, o2_e) == ones, "exact count");
        check(total(s_a, c_a, o1_a, o2_a) == ones - err, "pruned count");
        check(o1_a == ((x[0] & x[1]) | (x[0] & x[2]) | (x[1] & x[2])), "cout1 majority");
        if (c2 == 1) check(o1_a == o1_prev && o2_a == o2_prev, "couts independent of cin2");
        o1_prev = o1_a;
        o2_prev = o2_a;
      end
    end
    // worked example: x1..x5 = 0,1,1,0,1 ; cin1 = cin2 = 1
    x = 5'b10110; cin1 = 1'b1; cin2 = 1'b1;
    #1;
    check(total(s_e, c_e, o1_e, o2_e) == 5, "example exact");
    check(total(s_a, c_a, o1_a, o2_a) == 5, "example pruned");
    check(o1_a == 1'b1, "example cout1");
    check(s_a == 1'b1, "example sum");
    check(fired == 32, "pruning fired on 32 of 128 patterns");
    $display("pruning changed the result on %0d of 128 patterns", fired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
