// tb_final_adder: test of the 16-bit carry-propagate adder.
// Corner cases (all ones plus one, full carry chain) and 20000 random pairs,
// compared with the integer sum modulo 2^16.
module tb_final_adder
  import amul_pkg::*;
;
  prod_t ra, rb, p;
  int checks = 0, failures = 0;

  final_adder dut (.row_a(ra), .row_b(rb), .p(p));

  task automatic apply(input prod_t x, input prod_t y);
    int exp_sum;
    ra = x;
    rb = y;
    #1;
    exp_sum = (int'(x) + int'(y)) % 65536;
    checks++;
    if (int'(p) != exp_sum) begin
      failures++;
      $display("FAIL %h + %h -> %h, expected %h", x, y, p, exp_sum);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(16'h0000, 16'h0000);
    apply(16'hffff, 16'h0001);
    apply(16'h7fff, 16'h0001);
    apply(16'haaaa, 16'h5555);
    apply(16'h8000, 16'h8000);
    for (int n = 0; n < 20000; n++) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
