// Compressor reduction tree for an 8x8 unsigned multiplier. Partial products
// are reduced with 4-3, 5-3, 6-3 and 7-3 compressors, each of which counts
// the ones in one column and sends its three output bits to columns j, j+1
// and j+2 of the next stage. While some column is taller than three bits,
// each column, per stage, feeds as many bits as possible (at most seven) to
// one compressor, repeats while four or more bits are left, puts three left
// over bits into a full adder and passes one or two bits on. A column of ten
// bits so becomes one 7-3 compressor and one full adder, as in the document's
// example. A final stage of full and half adders takes the three-high matrix
// to two rows. Bits that would land in column 16 or above are always zero for
// an 8x8 unsigned product and are dropped. The compressor sizes and the
// 7-3-plus-full-adder choice are the document's; the exact schedule is this
// design's own. The netlist below was produced by a generator that applies
// this schedule and is checked exhaustively. Combinational.
module comp_tree (
  input  logic [7:0][7:0] pp,   // pp[i][j] = b[i] & a[j], weight i+j
  output logic [15:0]       row0,   // first bit of each final column
  output logic [15:0]       row1    // second bit, 0 where the column has one
);
  // stage 1 outputs
  logic s1_w0, s1_w1, s1_w2, s1_w3, s1_w4, s1_w5, s1_w6, s1_w7;
  logic s1_w8, s1_w9, s1_w10, s1_w11, s1_w12, s1_w13, s1_w14, s1_w15;
  logic s1_w16, s1_w17, s1_w18, s1_w19, s1_w20, s1_w21, s1_w22, s1_w23;
  logic s1_w24, s1_w25, s1_w26, s1_w27, s1_w28, s1_w29, s1_w30;
  // stage 2 outputs
  logic s2_w31, s2_w32, s2_w33, s2_w34, s2_w35, s2_w36, s2_w37, s2_w38;
  logic s2_w39, s2_w40, s2_w41, s2_w42, s2_w43, s2_w44, s2_w45, s2_w46;
  logic s2_w47, s2_w48, s2_w49, s2_w50;
  // stage 3 outputs
  logic s3_w51, s3_w52, s3_w53, s3_w54, s3_w55, s3_w56, s3_w57, s3_w58;
  logic s3_w59, s3_w60, s3_w61, s3_w62;

  // ---- reduction stage 1 ----
  full_adder u_fa0 (.a(pp[0][2]), .b(pp[1][1]), .ci(pp[2][0]), .s(s1_w0), .co(s1_w1));
  comp_4_3 u_c43_1 (.x({pp[3][0], pp[2][1], pp[1][2], pp[0][3]}), .cin(1'b0), .s({s1_w4, s1_w3, s1_w2}));
  comp_5_3 u_c53_2 (.i({pp[4][0], pp[3][1], pp[2][2], pp[1][3], pp[0][4]}), .x({s1_w7, s1_w6, s1_w5}));
  comp_6_3 u_c63_3 (.i({pp[5][0], pp[4][1], pp[3][2], pp[2][3], pp[1][4], pp[0][5]}), .x({s1_w10, s1_w9, s1_w8}));
  comp_7_3 u_c73_4 (.i({pp[6][0], pp[5][1], pp[4][2], pp[3][3], pp[2][4], pp[1][5], pp[0][6]}), .x({s1_w13, s1_w12, s1_w11}));
  comp_7_3 u_c73_5 (.i({pp[6][1], pp[5][2], pp[4][3], pp[3][4], pp[2][5], pp[1][6], pp[0][7]}), .x({s1_w16, s1_w15, s1_w14}));
  comp_7_3 u_c73_6 (.i({pp[7][1], pp[6][2], pp[5][3], pp[4][4], pp[3][5], pp[2][6], pp[1][7]}), .x({s1_w19, s1_w18, s1_w17}));
  comp_6_3 u_c63_7 (.i({pp[7][2], pp[6][3], pp[5][4], pp[4][5], pp[3][6], pp[2][7]}), .x({s1_w22, s1_w21, s1_w20}));
  comp_5_3 u_c53_8 (.i({pp[7][3], pp[6][4], pp[5][5], pp[4][6], pp[3][7]}), .x({s1_w25, s1_w24, s1_w23}));
  comp_4_3 u_c43_9 (.x({pp[7][4], pp[6][5], pp[5][6], pp[4][7]}), .cin(1'b0), .s({s1_w28, s1_w27, s1_w26}));
  full_adder u_fa10 (.a(pp[5][7]), .b(pp[6][6]), .ci(pp[7][5]), .s(s1_w29), .co(s1_w30));
  // ---- reduction stage 2 ----
  full_adder u_fa11 (.a(s1_w4), .b(s1_w6), .ci(s1_w8), .s(s2_w31), .co(s2_w32));
  full_adder u_fa12 (.a(s1_w7), .b(s1_w9), .ci(s1_w11), .s(s2_w33), .co(s2_w34));
  comp_4_3 u_c43_13 (.x({pp[7][0], s1_w14, s1_w12, s1_w10}), .cin(1'b0), .s({s2_w37, s2_w36, s2_w35}));
  full_adder u_fa14 (.a(s1_w13), .b(s1_w15), .ci(s1_w17), .s(s2_w38), .co(s2_w39));
  full_adder u_fa15 (.a(s1_w16), .b(s1_w18), .ci(s1_w20), .s(s2_w40), .co(s2_w41));
  full_adder u_fa16 (.a(s1_w19), .b(s1_w21), .ci(s1_w23), .s(s2_w42), .co(s2_w43));
  full_adder u_fa17 (.a(s1_w22), .b(s1_w24), .ci(s1_w26), .s(s2_w44), .co(s2_w45));
  full_adder u_fa18 (.a(s1_w25), .b(s1_w27), .ci(s1_w29), .s(s2_w46), .co(s2_w47));
  comp_4_3 u_c43_19 (.x({pp[7][6], pp[6][7], s1_w30, s1_w28}), .cin(1'b0), .s({s2_w50, s2_w49, s2_w48}));
  // ---- reduction stage 3 ----
  full_adder u_fa20 (.a(s2_w37), .b(s2_w39), .ci(s2_w40), .s(s3_w51), .co(s3_w52));
  half_adder u_ha21 (.a(s2_w41), .b(s2_w42), .s(s3_w53), .c(s3_w54));
  half_adder u_ha22 (.a(s2_w43), .b(s2_w44), .s(s3_w55), .c(s3_w56));
  half_adder u_ha23 (.a(s2_w45), .b(s2_w46), .s(s3_w57), .c(s3_w58));
  half_adder u_ha24 (.a(s2_w47), .b(s2_w48), .s(s3_w59), .c(s3_w60));
  half_adder u_ha25 (.a(s2_w49), .b(pp[7][7]), .s(s3_w61), .c(s3_w62));

  // ---- final two rows ----
  assign row0[0] = pp[0][0];
  assign row1[0] = 1'b0;
  assign row0[1] = pp[0][1];
  assign row1[1] = pp[1][0];
  assign row0[2] = s1_w0;
  assign row1[2] = 1'b0;
  assign row0[3] = s1_w1;
  assign row1[3] = s1_w2;
  assign row0[4] = s1_w3;
  assign row1[4] = s1_w5;
  assign row0[5] = s2_w31;
  assign row1[5] = 1'b0;
  assign row0[6] = s2_w32;
  assign row1[6] = s2_w33;
  assign row0[7] = s2_w34;
  assign row1[7] = s2_w35;
  assign row0[8] = s2_w36;
  assign row1[8] = s2_w38;
  assign row0[9] = s3_w51;
  assign row1[9] = 1'b0;
  assign row0[10] = s3_w52;
  assign row1[10] = s3_w53;
  assign row0[11] = s3_w54;
  assign row1[11] = s3_w55;
  assign row0[12] = s3_w56;
  assign row1[12] = s3_w57;
  assign row0[13] = s3_w58;
  assign row1[13] = s3_w59;
  assign row0[14] = s3_w60;
  assign row1[14] = s3_w61;
  assign row0[15] = s3_w62;
  assign row1[15] = s2_w50;
endmodule
