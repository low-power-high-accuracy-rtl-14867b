// amul_pkg: sizes and types shared by the 8x8 approximate multiplier.
//
// The multiplier is built for 8-bit unsigned operands and a 16-bit product, the
// size the design is presented at. The reduction tree is hand-wired column by
// column for this size, so N is a package constant rather than a module parameter.
// pp_mat_t holds the partial-product matrix: pp[i][j] = a[j] & b[i], weight 2^(i+j).
package amul_pkg;
  localparam int unsigned N    = 8;       // operand width
  localparam int unsigned PW   = 2 * N;   // product width
  localparam int unsigned NCOL = 2 * N - 1; // partial-product columns 0 .. 2N-2

  typedef logic [N-1:0]           pp_row_t;
  typedef pp_row_t [N-1:0]        pp_mat_t;
  typedef logic [PW-1:0]          prod_t;
endpackage
