// amul_tb_pkg: reference model for the testbenches of the approximate multiplier.
//
// The approximate 5:2 compressor loses exactly one unit of its column weight
// when its cin1 input is 1 and its x4, x5 inputs are equal; everything else in
// the multiplier is exact. So the expected product is a * b minus 2^k for every
// middle column k (5..9) whose compressor fires. The model recomputes, straight
// from a and b, which partial products reach those inputs:
//   column k bit m is a[j] & b[i] with i = max(0, k-7) + m, j = k - i;
//   x4, x5 of column k are bits 3 and 4;
//   cin1 of column 5 is its bit 5, and of column k > 5 it is the majority of
//   bits 0..2 of column k-1 (cout1 of the compressor below).
package amul_tb_pkg;
  localparam int MID_LO = 5;
  localparam int MID_HI = 9;

  function automatic bit colbit(input logic [7:0] a, input logic [7:0] b,
                                input int k, input int m);
    int i, j;
    i = ((k > 7) ? k - 7 : 0) + m;
    j = k - i;
    if (i < 0 || i > 7 || j < 0 || j > 7) return 1'b0;
    return a[j] & b[i];
  endfunction

  function automatic bit maj3(input bit p, input bit q, input bit r);
    return (p & q) | (p & r) | (q & r);
  endfunction

  // bit k of the result is 1 when the approximate compressor of column k fires
  function automatic logic [15:0] fire_mask(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] f;
    bit cin1, x4, x5;
    f = '0;
    for (int k = MID_LO; k <= MID_HI; k++) begin
      x4 = colbit(a, b, k, 3);
      x5 = colbit(a, b, k, 4);
      if (k == MID_LO) cin1 = colbit(a, b, k, 5);
      else cin1 = maj3(colbit(a, b, k - 1, 0), colbit(a, b, k - 1, 1), colbit(a, b, k - 1, 2));
      f[k] = cin1 & (x4 == x5);
    end
    return f;
  endfunction

  // expected output of the approximate multiplier
  function automatic logic [15:0] approx_product(input logic [7:0] a, input logic [7:0] b);
    return 16'(int'(a) * int'(b)) - fire_mask(a, b);
  endfunction
endpackage
