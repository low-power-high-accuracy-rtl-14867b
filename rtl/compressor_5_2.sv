// compressor_5_2: approximate 5:2 compressor obtained by probabilistic pruning.
//
// Seven bits of equal weight (x[0..4] = x1..x5, cin1, cin2) are reduced to sum
// (weight 1) and carry, cout1, cout2 (weight 2). The logic follows the
// multiplexer schematic of the pruned compressor:
//   cout1 = majority(x1, x2, x3)                   (static CMOS carry block)
//   s1    = x3 ? xnor(x1, x2) : xor(x1, x2)        (XOR-XNOR gate + MUX1)
//   m2    = cin1 ? <XNOR leg> : xor(x4, x5)        (XOR gate + MUX2)
//   t     = m2 ? ~s1 : s1                          (MUX3)
//   sum   = cin2 ? ~t : t                          (MUX4)
//   carry = t ? cin2 : s1                          (MUX5, selected by MUX3)
//   cout2 = xor(x4, x5) ? cin1 : x4                (MUX6)
// With APPROX = 1 (the proposed circuit) the XNOR leg feeding MUX2 is removed
// and that mux input is tied to 0, so m2 = ~cin1 & (x4 ^ x5). The weighted
// output then falls short of the input count by exactly one whenever
// cin1 = 1 and x4 = x5, and is exact otherwise. With APPROX = 0 the leg is
// kept and the compressor is exact (reference version).
// cout1 and cout2 depend only on x and cin1, never on cin2, and cin1/cin2 come
// from the next lower column's cout1/cout2, so a row of these has no ripple.
// The select of MUX6 is not shown in the schematic; xor(x4, x5) is this
// design's choice, the one that makes the unpruned circuit an exact counter.
// Purely combinational.
module compressor_5_2 #(
  parameter bit APPROX = 1'b1
) (
  input  logic [4:0] x,
  input  logic       cin1,
  input  logic       cin2,
  output logic       sum,
  output logic       carry,
  output logic       cout1,
  output logic       cout2
);
  logic xor12, xnor12, s1, s1_n;
  logic xor45, leg1, m2, t, t_n;

  // x1..x3: carry block and XOR-XNOR gate with MUX1 (dual-rail s1)
  assign cout1  = (x[0] & x[1]) | (x[0] & x[2]) | (x[1] & x[2]);
  assign xor12  = x[0] ^ x[1];
  assign xnor12 = ~xor12;
  assign s1     = x[2] ? xnor12 : xor12;
  assign s1_n   = x[2] ? xor12  : xnor12;

  // x4, x5, cin1: pruned XOR gate with MUX2, and MUX6
  assign xor45 = x[3] ^ x[4];
  assign leg1  = APPROX ? 1'b0 : ~xor45;
  assign m2    = cin1 ? leg1 : xor45;
  assign cout2 = xor45 ? cin1 : x[3];

  // final stage: MUX3, MUX4, MUX5
  assign t     = m2 ? s1_n : s1;
  assign t_n   = m2 ? s1   : s1_n;
  assign sum   = cin2 ? t_n : t;
  assign carry = t ? cin2 : s1;
endmodule
