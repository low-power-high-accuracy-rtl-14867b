// compressor_4_2: exact 4:2 compressor.
//
// Five bits of equal weight (x[0..3] = x1..x4 and cin) are reduced to sum
// (weight 1) and carry, cout (weight 2), so that
//   x1 + x2 + x3 + x4 + cin = sum + 2 * (carry + cout).
// It is two full adders in series: the first adds x1..x3 and gives cout, which
// therefore never depends on cin; the second adds the first sum, x4 and cin.
// A row of these therefore has no carry ripple: a column's cin is the next lower
// column's cout. The port set follows the usual 4:2 compressor symbol; the
// two-full-adder structure is the textbook realisation chosen here.
// Purely combinational.
module compressor_4_2 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);
  logic s1;

  full_adder u_fa1 (.a(x[0]), .b(x[1]), .ci(x[2]), .s(s1),  .co(cout));
  full_adder u_fa2 (.a(s1),   .b(x[3]), .ci(cin),  .s(sum), .co(carry));
endmodule
