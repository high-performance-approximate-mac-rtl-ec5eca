// dadda8_reduce: partial products and two-stage compressor reduction of the approximate
// 8x8 Dadda multiplier.
//
// The 64 partial products pp[i][k] = a[k] & b[i] (column i+k) are reduced to two 16-bit rows
// in two stages; their sum is the approximate product. The columns fall in three regions:
//   * columns 4..9 (the tall middle of the dot diagram): approximate majority-logic 5:2 and
//     7:2 compressors, 5:2 where a column holds 5 or 6 bits and 7:2 where it holds 7 or 8;
//     a bit a compressor cannot take goes on to stage 2;
//   * columns 10..14 (most significant): exact 5:2 and 4:2 compressors, and exact adders;
//   * columns 0..3 (least significant): a half adder, a full adder and one approximate
//     majority-logic 4:2 compressor.
// Compressor carry-outs (Cout1, Cout2) chain into the cin1/cin2 inputs of the compressor one
// column up within stage 1; a compressor with no neighbour below gets cin = 0. Stage 2 uses
// exact 4:2 compressors, full adders and half adders only and leaves at most two bits per
// column. The split into two stages, the compressor families per region and the use of exact
// cells in stage 2 follow the design. The exact column-by-column placement below and the
// order in which a column's bits enter a compressor (lowest row first) are this design's own.
//
// Ports: a, b unsigned 8-bit operands; row_a, row_b the two reduced rows (bit j has weight
// 2^j). Purely combinational; row_a + row_b needs 17 bits because the approximate
// compressors can overshoot 255*255.
module dadda8_reduce
  import mac_pkg::*;
(
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  output logic [ROW_W-1:0] row_a,
  output logic [ROW_W-1:0] row_b
);
  // pp[i][k]: bit k of a times bit i of b, weight 2^(i+k)
  logic [N-1:0][N-1:0] pp;

  always_comb begin
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++)
        pp[i][k] = a[k] & b[i];
  end

  // Stage 1 and stage 2 output nets
  logic s1_c1_s, s1_c1_c, s1_c2_s, s1_c2_c;
  logic s1_c3_sum, s1_c3_carry, s1_c3_cout, s1_c4_sum;
  logic s1_c4_carry, s1_c4_cout1, s1_c4_cout2, s1_c5_sum;
  logic s1_c5_carry, s1_c5_cout1, s1_c5_cout2, s1_c6_sum;
  logic s1_c6_carry, s1_c6_cout1, s1_c6_cout2, s1_c7_sum;
  logic s1_c7_carry, s1_c7_cout1, s1_c7_cout2, s1_c8_sum;
  logic s1_c8_carry, s1_c8_cout1, s1_c8_cout2, s1_c9_sum;
  logic s1_c9_carry, s1_c9_cout1, s1_c9_cout2, s1_c10_sum;
  logic s1_c10_carry, s1_c10_cout1, s1_c10_cout2, s1_c11_sum;
  logic s1_c11_carry, s1_c11_cout, s2_c5_s, s2_c5_c;
  logic s2_c6_s, s2_c6_c, s2_c7_s, s2_c7_c;
  logic s2_c8_s, s2_c8_c, s2_c9_s, s2_c9_c;
  logic s2_c10_s, s2_c10_c, s2_c11_s, s2_c11_c;
  logic s2_c12_sum, s2_c12_carry, s2_c12_cout, s2_c13_s;
  logic s2_c13_c;

  // ---- Stage 1 ----
  half_adder u_s1_c1_ha (.a(pp[0][1]), .b(pp[1][0]), .s(s1_c1_s), .co(s1_c1_c));
  full_adder u_s1_c2_fa (.a(pp[0][2]), .b(pp[1][1]), .ci(pp[2][0]), .s(s1_c2_s), .co(s1_c2_c));
  maj_comp42 u_s1_c3_comp42 (.x1(pp[0][3]), .x2(pp[1][2]), .x3(pp[2][1]), .x4(pp[3][0]), .cin(s1_c2_c), .sum(s1_c3_sum), .carry(s1_c3_carry), .cout(s1_c3_cout));
  maj_comp52 u_s1_c4_comp52 (.x1(pp[0][4]), .x2(pp[1][3]), .x3(pp[2][2]), .x4(pp[3][1]), .x5(pp[4][0]), .cin1(s1_c3_cout), .cin2(1'b0), .sum(s1_c4_sum), .carry(s1_c4_carry), .cout1(s1_c4_cout1), .cout2(s1_c4_cout2));
  maj_comp52 u_s1_c5_comp52 (.x1(pp[0][5]), .x2(pp[1][4]), .x3(pp[2][3]), .x4(pp[3][2]), .x5(pp[4][1]), .cin1(s1_c4_cout1), .cin2(s1_c4_cout2), .sum(s1_c5_sum), .carry(s1_c5_carry), .cout1(s1_c5_cout1), .cout2(s1_c5_cout2));
  maj_comp72 u_s1_c6_comp72 (.x1(pp[0][6]), .x2(pp[1][5]), .x3(pp[2][4]), .x4(pp[3][3]), .x5(pp[4][2]), .x6(pp[5][1]), .x7(pp[6][0]), .cin1(s1_c5_cout1), .cin2(s1_c5_cout2), .sum(s1_c6_sum), .carry(s1_c6_carry), .cout1(s1_c6_cout1), .cout2(s1_c6_cout2));
  maj_comp72 u_s1_c7_comp72 (.x1(pp[0][7]), .x2(pp[1][6]), .x3(pp[2][5]), .x4(pp[3][4]), .x5(pp[4][3]), .x6(pp[5][2]), .x7(pp[6][1]), .cin1(s1_c6_cout1), .cin2(s1_c6_cout2), .sum(s1_c7_sum), .carry(s1_c7_carry), .cout1(s1_c7_cout1), .cout2(s1_c7_cout2));
  maj_comp72 u_s1_c8_comp72 (.x1(pp[1][7]), .x2(pp[2][6]), .x3(pp[3][5]), .x4(pp[4][4]), .x5(pp[5][3]), .x6(pp[6][2]), .x7(pp[7][1]), .cin1(s1_c7_cout1), .cin2(s1_c7_cout2), .sum(s1_c8_sum), .carry(s1_c8_carry), .cout1(s1_c8_cout1), .cout2(s1_c8_cout2));
  maj_comp52 u_s1_c9_comp52 (.x1(pp[2][7]), .x2(pp[3][6]), .x3(pp[4][5]), .x4(pp[5][4]), .x5(pp[6][3]), .cin1(s1_c8_cout1), .cin2(s1_c8_cout2), .sum(s1_c9_sum), .carry(s1_c9_carry), .cout1(s1_c9_cout1), .cout2(s1_c9_cout2));
  exact_comp52 u_s1_c10_ex52 (.x1(pp[3][7]), .x2(pp[4][6]), .x3(pp[5][5]), .x4(pp[6][4]), .x5(pp[7][3]), .cin1(s1_c9_cout1), .cin2(s1_c9_cout2), .sum(s1_c10_sum), .carry(s1_c10_carry), .cout1(s1_c10_cout1), .cout2(s1_c10_cout2));
  exact_comp42 u_s1_c11_ex42 (.x1(pp[4][7]), .x2(pp[5][6]), .x3(pp[6][5]), .x4(pp[7][4]), .cin(s1_c10_cout1), .sum(s1_c11_sum), .carry(s1_c11_carry), .cout(s1_c11_cout));

  // ---- Stage 2 ----
  full_adder u_s2_c5_fa (.a(s1_c4_carry), .b(s1_c5_sum), .ci(pp[5][0]), .s(s2_c5_s), .co(s2_c5_c));
  half_adder u_s2_c6_ha (.a(s1_c5_carry), .b(s1_c6_sum), .s(s2_c6_s), .co(s2_c6_c));
  full_adder u_s2_c7_fa (.a(s1_c6_carry), .b(s1_c7_sum), .ci(pp[7][0]), .s(s2_c7_s), .co(s2_c7_c));
  half_adder u_s2_c8_ha (.a(s1_c7_carry), .b(s1_c8_sum), .s(s2_c8_s), .co(s2_c8_c));
  full_adder u_s2_c9_fa (.a(s1_c8_carry), .b(s1_c9_sum), .ci(pp[7][2]), .s(s2_c9_s), .co(s2_c9_c));
  half_adder u_s2_c10_ha (.a(s1_c9_carry), .b(s1_c10_sum), .s(s2_c10_s), .co(s2_c10_c));
  full_adder u_s2_c11_fa (.a(s1_c10_carry), .b(s1_c10_cout2), .ci(s1_c11_sum), .s(s2_c11_s), .co(s2_c11_c));
  exact_comp42 u_s2_c12_ex42 (.x1(s1_c11_carry), .x2(s1_c11_cout), .x3(pp[5][7]), .x4(pp[6][6]), .cin(pp[7][5]), .sum(s2_c12_sum), .carry(s2_c12_carry), .cout(s2_c12_cout));
  full_adder u_s2_c13_fa (.a(pp[6][7]), .b(pp[7][6]), .ci(s2_c12_cout), .s(s2_c13_s), .co(s2_c13_c));

  // ---- Two rows handed to the final adder ----
  assign row_a = {1'b0, pp[7][7], s2_c13_s, s2_c12_sum, s2_c11_s, s2_c10_s, s2_c9_s, s2_c8_s, s2_c7_s, s2_c6_s, s2_c5_s, s1_c3_carry, s1_c3_sum, s1_c1_c, s1_c1_s, pp[0][0]};
  assign row_b = {1'b0, s2_c13_c, s2_c12_carry, s2_c11_c, s2_c10_c, s2_c9_c, s2_c8_c, s2_c7_c, s2_c6_c, s2_c5_c, 1'b0, s1_c4_sum, 1'b0, s1_c2_s, 1'b0, 1'b0};
endmodule
