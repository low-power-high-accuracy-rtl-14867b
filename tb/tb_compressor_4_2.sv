// tb_compressor_4_2: exhaustive test of the exact 4:2 compressor.
// For all 32 input patterns checks sum + 2*(carry + cout) = number of ones,
// and that cout is the same for cin = 0 and cin = 1 (no ripple through cout).
module tb_compressor_4_2;
  logic [3:0] x;
  logic       cin, sum, carry, cout;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic cout_c0;
    for (int v = 0; v < 16; v++) begin
      for (int c = 0; c < 2; c++) begin
        x   = 4'(v);
        cin = 1'(c);
        #1;
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout)) != $countones({x, cin})) begin
          failures++;
          $display("FAIL count x=%b cin=%b -> sum=%b carry=%b cout=%b", x, cin, sum, carry, cout);
        end
        if (c == 0) cout_c0 = cout;
        else begin
          checks++;
          if (cout !== cout_c0) begin
            failures++;
            $display("FAIL cout depends on cin, x=%b", x);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
