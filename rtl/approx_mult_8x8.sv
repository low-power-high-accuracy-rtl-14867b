// approx_mult_8x8: low-power, high-accuracy approximate 8x8 unsigned multiplier.
//
// p ~= a * b, computed in the three classic stages: an AND array of partial
// products (pp_gen), a compressor tree (pp_tree) and a carry-propagate adder
// (final_adder). Accuracy is kept where it matters by exact 4:2 compressors in
// the high-weight columns; power is cut by pruned approximate 5:2 compressors
// in the middle-weight columns, where the tree is tallest. Each approximate
// compressor may drop 2^k from the column-k total, so p <= a * b always, and
// p = a * b whenever none of them fires. APPROX = 0 builds the same tree with
// exact 5:2 compressors, giving an exact multiplier for comparison.
// Interface: a, b (8-bit unsigned), p (16-bit). Purely combinational, no
// clock: the result is valid one propagation delay after the operands.
module approx_mult_8x8
  import amul_pkg::*;
#(
  parameter bit APPROX = 1'b1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output prod_t        p
);
  pp_mat_t pp;
  prod_t   row_a, row_b;

  pp_gen                      u_pp   (.a(a), .b(b), .pp(pp));
  pp_tree #(.APPROX(APPROX))  u_tree (.pp(pp), .row_a(row_a), .row_b(row_b));
  final_adder                 u_add  (.row_a(row_a), .row_b(row_b), .p(p));
endmodule
