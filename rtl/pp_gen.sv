// pp_gen: partial-product generator of the 8x8 unsigned multiplier.
//
// First stage of the multiplier: an AND array forming pp[i][j] = a[j] & b[i],
// the bit of weight 2^(i+j). Operands are unsigned and no recoding is used;
// both are this design's choice. Purely combinational.
module pp_gen
  import amul_pkg::*;
(
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output pp_mat_t      pp
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      pp[i] = a & {N{b[i]}};
    end
  end
endmodule
