// final_adder: carry-propagate adder, third stage of the multiplier.
//
// Adds the two rows left by the compressor tree into the 16-bit product,
// modulo 2^16 (the true product always fits, so no carry is lost). Written as
// a plain adder and left to synthesis to map; the adder architecture is this
// design's choice. Purely combinational.
module final_adder
  import amul_pkg::*;
(
  input  prod_t row_a,
  input  prod_t row_b,
  output prod_t p
);
  assign p = row_a + row_b;
endmodule
