// pp_tree: two-level compressor tree of the 8x8 approximate multiplier.
//
// Second stage of the multiplier. The 64 partial products sit in columns
// 0..14 with heights 1,2,..,8,..,2,1. The tree reduces them to two 16-bit rows
// for the final adder. It follows the accuracy/power split of the design:
//   * middle columns 5..9 (the tallest ones): one approximate 5:2 compressor
//     each, chained column to column through cout1/cout2 -> cin1/cin2;
//   * high columns 10..12: exact 4:2 compressors, chained through cout -> cin;
//   * low columns 0..4 and leftovers: exact full adders, or passed through.
// Level 1 brings every column to at most four bits. Level 2 is a chain of exact
// 4:2 compressors over columns 2..14 that leaves sum bits in row_a and carry
// bits in row_b. Column boundaries, the level-2 structure and the choice of
// which bits feed which compressor input are this design's own; the text fixes
// only which compressor kind serves which range of weights.
//
// Level-1 wiring (col k bit m = pp[i][k-i], i = max(0, k-7) + m):
//   col 4 : FA(b0,b1,b2)                      -> b3, b4, fa4.s     ; fa4.c  -> col 5
//   col 5 : A5(x=b0..b4, cin1=b5, cin2=fa4.c) -> a5.sum
//   col 6 : A6(x=b0..b4, cins=A5 couts)       -> b5, b6, a5.carry, a6.sum
//   col 7 : A7(x=b0..b4, cins=A6 couts), FA(b5,b6,b7) -> a6.carry, a7.sum, fa7.s
//   col 8 : A8(x=b0..b4, cins=A7 couts), FA(b5,b6,a7.carry) -> fa7.c, a8.sum, fa8.s
//   col 9 : A9(x=b0..b4, cins=A8 couts)       -> b5, a8.carry, fa8.c, a9.sum
//   col 10: E10(x=b0..b3, cin=a9.carry)       -> b4, a9.cout1, a9.cout2, e10.sum
//   col 11: E11(x=b0..b3, cin=e10.cout)       -> e10.carry, e11.sum
//   col 12: E12(x=b0,b1,b2,e11.carry, cin=e11.cout) -> e12.sum
//   col 13:                                   -> b0, b1, e12.carry, e12.cout
// (A = approximate 5:2, E = exact 4:2, FA = full adder.) Only the A
// compressors can err, each by -2^k when its cin1 = 1 and x4 = x5, so the
// result never exceeds the exact product. APPROX = 0 makes them exact.
// Level-2 compressors in short columns get constant-0 inputs, so a few bits
// of row_a/row_b (e.g. row_b[0], row_b[2], row_b[3], row_a[15]) are always 0;
// synthesis folds that logic away. The uniform chain keeps the wiring simple.
// Purely combinational.
module pp_tree
  import amul_pkg::*;
#(
  parameter bit APPROX = 1'b1
) (
  input  pp_mat_t pp,
  output prod_t   row_a,
  output prod_t   row_b
);
  localparam int unsigned MID_LO = 5;   // first column of approximate 5:2 compressors
  localparam int unsigned MID_HI = 9;   // last one
  localparam int unsigned L2_LO  = 2;   // level-2 chain spans these columns
  localparam int unsigned L2_HI  = 14;

  // column view of the partial products: col[k][m]
  logic [N-1:0] col [NCOL];
  always_comb begin
    for (int k = 0; k < NCOL; k++) begin
      col[k] = '0;
      for (int m = 0; m < N; m++) begin
        automatic int i = ((k > N - 1) ? k - (N - 1) : 0) + m;
        if (i < N && k - i >= 0 && k - i < N) col[k][m] = pp[i][k-i];
      end
    end
  end

  // ---------------------------------------------------------------- level 1
  logic fa4_s, fa4_c, fa7_s, fa7_c, fa8_s, fa8_c;
  logic [MID_HI:MID_LO] a_sum, a_carry, a_cout1, a_cout2, a_cin1, a_cin2;
  logic [12:10]         e_sum, e_carry, e_cout;

  full_adder u_fa4 (.a(col[4][0]), .b(col[4][1]), .ci(col[4][2]), .s(fa4_s), .co(fa4_c));

  assign a_cin1[MID_LO] = col[MID_LO][5];
  assign a_cin2[MID_LO] = fa4_c;
  for (genvar k = MID_LO + 1; k <= MID_HI; k++) begin : g_chain
    assign a_cin1[k] = a_cout1[k-1];
    assign a_cin2[k] = a_cout2[k-1];
  end

  for (genvar k = MID_LO; k <= MID_HI; k++) begin : g_mid
    compressor_5_2 #(.APPROX(APPROX)) u_c52 (
      .x    (col[k][4:0]),
      .cin1 (a_cin1[k]),
      .cin2 (a_cin2[k]),
      .sum  (a_sum[k]),
      .carry(a_carry[k]),
      .cout1(a_cout1[k]),
      .cout2(a_cout2[k])
    );
  end

  full_adder u_fa7 (.a(col[7][5]), .b(col[7][6]), .ci(col[7][7]),  .s(fa7_s), .co(fa7_c));
  full_adder u_fa8 (.a(col[8][5]), .b(col[8][6]), .ci(a_carry[7]), .s(fa8_s), .co(fa8_c));

  compressor_4_2 u_e10 (.x(col[10][3:0]), .cin(a_carry[9]),
                        .sum(e_sum[10]), .carry(e_carry[10]), .cout(e_cout[10]));
  compressor_4_2 u_e11 (.x(col[11][3:0]), .cin(e_cout[10]),
                        .sum(e_sum[11]), .carry(e_carry[11]), .cout(e_cout[11]));
  compressor_4_2 u_e12 (.x({e_carry[11], col[12][2:0]}), .cin(e_cout[11]),
                        .sum(e_sum[12]), .carry(e_carry[12]), .cout(e_cout[12]));

  // ---------------------------------------------------------------- level 2
  logic [3:0]         l2_x    [L2_LO:L2_HI];
  logic [L2_HI:L2_LO] l2_sum, l2_carry, l2_cout;

  assign l2_x[2]  = {1'b0, col[2][2:0]};
  assign l2_x[3]  = col[3][3:0];
  assign l2_x[4]  = {1'b0, fa4_s, col[4][4:3]};
  assign l2_x[5]  = {3'b000, a_sum[5]};
  assign l2_x[6]  = {a_sum[6], a_carry[5], col[6][6:5]};
  assign l2_x[7]  = {1'b0, fa7_s, a_sum[7], a_carry[6]};
  assign l2_x[8]  = {1'b0, fa8_s, a_sum[8], fa7_c};
  assign l2_x[9]  = {a_sum[9], fa8_c, a_carry[8], col[9][5]};
  assign l2_x[10] = {e_sum[10], a_cout2[9], a_cout1[9], col[10][4]};
  assign l2_x[11] = {2'b00, e_sum[11], e_carry[10]};
  assign l2_x[12] = {3'b000, e_sum[12]};
  assign l2_x[13] = {e_cout[12], e_carry[12], col[13][1:0]};
  assign l2_x[14] = {3'b000, col[14][0]};

  for (genvar k = L2_LO; k <= L2_HI; k++) begin : g_l2
    logic cin;
    if (k == L2_LO) begin : g_first
      assign cin = 1'b0;
    end else begin : g_next
      assign cin = l2_cout[k-1];
    end
    compressor_4_2 u_c42 (.x(l2_x[k]), .cin(cin),
                          .sum(l2_sum[k]), .carry(l2_carry[k]), .cout(l2_cout[k]));
  end

  // ---------------------------------------------------------------- two rows
  assign row_a = {l2_cout[L2_HI], l2_sum, col[1][0], col[0][0]};
  assign row_b = {l2_carry, 1'b0, col[1][1], 1'b0};
endmodule
