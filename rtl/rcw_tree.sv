// Reduced-complexity Wallace reduction tree for an 8x8 unsigned multiplier.
// It takes the 64 AND-gate partial products and reduces them, in four
// stages of full and half adders, to two rows whose sum is the product.
// Per stage and per column (least significant first), with h bits:
//   - every group of three bits goes into a full adder (sum stays in the
//     column, carry goes one column up), as in a conventional Wallace tree;
//   - a remaining pair of bits is passed on untouched, unlike a conventional
//     Wallace tree, and a single bit is passed on;
//   - a half adder is used on the remaining pair only when the column would
//     otherwise end the stage taller than a conventional Wallace tree allows
//     (8 -> 6 -> 4 -> 3 -> 2), so the stage count stays that of Wallace.
// These three rules are the document's; the exact test for the half adder
// is this design's reading of them. The result is 39 full adders and 3 half
// adders. The netlist below was produced by a small generator that applies
// exactly these rules; it is checked exhaustively for all 65,536 operand
// pairs. Column 15 and column 0 of row1 stay empty. Combinational.
module rcw_tree (
  input  logic [7:0][7:0] pp,   // pp[i][j] = b[i] & a[j], weight i+j
  output logic [15:0]       row0,   // first bit of each final column
  output logic [15:0]       row1    // second bit, 0 where the column has one
);
  // stage 1 outputs
  logic s1_w0, s1_w1, s1_w2, s1_w3, s1_w4, s1_w5, s1_w6, s1_w7;
  logic s1_w8, s1_w9, s1_w10, s1_w11, s1_w12, s1_w13, s1_w14, s1_w15;
  logic s1_w16, s1_w17, s1_w18, s1_w19, s1_w20, s1_w21, s1_w22, s1_w23;
  logic s1_w24, s1_w25, s1_w26, s1_w27, s1_w28, s1_w29, s1_w30, s1_w31;
  // stage 2 outputs
  logic s2_w32, s2_w33, s2_w34, s2_w35, s2_w36, s2_w37, s2_w38, s2_w39;
  logic s2_w40, s2_w41, s2_w42, s2_w43, s2_w44, s2_w45, s2_w46, s2_w47;
  logic s2_w48, s2_w49, s2_w50, s2_w51, s2_w52, s2_w53, s2_w54, s2_w55;
  // stage 3 outputs
  logic s3_w56, s3_w57, s3_w58, s3_w59, s3_w60, s3_w61, s3_w62, s3_w63;
  logic s3_w64, s3_w65, s3_w66, s3_w67, s3_w68, s3_w69;
  // stage 4 outputs
  logic s4_w70, s4_w71, s4_w72, s4_w73, s4_w74, s4_w75, s4_w76, s4_w77;
  logic s4_w78, s4_w79, s4_w80, s4_w81, s4_w82, s4_w83;

  // ---- reduction stage 1 ----
  full_adder u_fa0 (.a(pp[0][2]), .b(pp[1][1]), .ci(pp[2][0]), .s(s1_w0), .co(s1_w1));
  full_adder u_fa1 (.a(pp[0][3]), .b(pp[1][2]), .ci(pp[2][1]), .s(s1_w2), .co(s1_w3));
  full_adder u_fa2 (.a(pp[0][4]), .b(pp[1][3]), .ci(pp[2][2]), .s(s1_w4), .co(s1_w5));
  full_adder u_fa3 (.a(pp[0][5]), .b(pp[1][4]), .ci(pp[2][3]), .s(s1_w6), .co(s1_w7));
  full_adder u_fa4 (.a(pp[3][2]), .b(pp[4][1]), .ci(pp[5][0]), .s(s1_w8), .co(s1_w9));
  full_adder u_fa5 (.a(pp[0][6]), .b(pp[1][5]), .ci(pp[2][4]), .s(s1_w10), .co(s1_w11));
  full_adder u_fa6 (.a(pp[3][3]), .b(pp[4][2]), .ci(pp[5][1]), .s(s1_w12), .co(s1_w13));
  full_adder u_fa7 (.a(pp[0][7]), .b(pp[1][6]), .ci(pp[2][5]), .s(s1_w14), .co(s1_w15));
  full_adder u_fa8 (.a(pp[3][4]), .b(pp[4][3]), .ci(pp[5][2]), .s(s1_w16), .co(s1_w17));
  full_adder u_fa9 (.a(pp[1][7]), .b(pp[2][6]), .ci(pp[3][5]), .s(s1_w18), .co(s1_w19));
  full_adder u_fa10 (.a(pp[4][4]), .b(pp[5][3]), .ci(pp[6][2]), .s(s1_w20), .co(s1_w21));
  full_adder u_fa11 (.a(pp[2][7]), .b(pp[3][6]), .ci(pp[4][5]), .s(s1_w22), .co(s1_w23));
  full_adder u_fa12 (.a(pp[5][4]), .b(pp[6][3]), .ci(pp[7][2]), .s(s1_w24), .co(s1_w25));
  full_adder u_fa13 (.a(pp[3][7]), .b(pp[4][6]), .ci(pp[5][5]), .s(s1_w26), .co(s1_w27));
  full_adder u_fa14 (.a(pp[4][7]), .b(pp[5][6]), .ci(pp[6][5]), .s(s1_w28), .co(s1_w29));
  full_adder u_fa15 (.a(pp[5][7]), .b(pp[6][6]), .ci(pp[7][5]), .s(s1_w30), .co(s1_w31));
  // ---- reduction stage 2 ----
  full_adder u_fa16 (.a(s1_w1), .b(s1_w2), .ci(pp[3][0]), .s(s2_w32), .co(s2_w33));
  full_adder u_fa17 (.a(s1_w3), .b(s1_w4), .ci(pp[3][1]), .s(s2_w34), .co(s2_w35));
  full_adder u_fa18 (.a(s1_w5), .b(s1_w6), .ci(s1_w8), .s(s2_w36), .co(s2_w37));
  full_adder u_fa19 (.a(s1_w7), .b(s1_w9), .ci(s1_w10), .s(s2_w38), .co(s2_w39));
  full_adder u_fa20 (.a(s1_w11), .b(s1_w13), .ci(s1_w14), .s(s2_w40), .co(s2_w41));
  full_adder u_fa21 (.a(s1_w16), .b(pp[6][1]), .ci(pp[7][0]), .s(s2_w42), .co(s2_w43));
  full_adder u_fa22 (.a(s1_w15), .b(s1_w17), .ci(s1_w18), .s(s2_w44), .co(s2_w45));
  half_adder u_ha23 (.a(s1_w20), .b(pp[7][1]), .s(s2_w46), .c(s2_w47));
  full_adder u_fa24 (.a(s1_w19), .b(s1_w21), .ci(s1_w22), .s(s2_w48), .co(s2_w49));
  full_adder u_fa25 (.a(s1_w23), .b(s1_w25), .ci(s1_w26), .s(s2_w50), .co(s2_w51));
  full_adder u_fa26 (.a(s1_w27), .b(s1_w28), .ci(pp[7][4]), .s(s2_w52), .co(s2_w53));
  full_adder u_fa27 (.a(s1_w31), .b(pp[6][7]), .ci(pp[7][6]), .s(s2_w54), .co(s2_w55));
  // ---- reduction stage 3 ----
  full_adder u_fa28 (.a(s2_w33), .b(s2_w34), .ci(pp[4][0]), .s(s3_w56), .co(s3_w57));
  full_adder u_fa29 (.a(s2_w37), .b(s2_w38), .ci(s1_w12), .s(s3_w58), .co(s3_w59));
  full_adder u_fa30 (.a(s2_w39), .b(s2_w40), .ci(s2_w42), .s(s3_w60), .co(s3_w61));
  full_adder u_fa31 (.a(s2_w41), .b(s2_w43), .ci(s2_w44), .s(s3_w62), .co(s3_w63));
  full_adder u_fa32 (.a(s2_w45), .b(s2_w47), .ci(s2_w48), .s(s3_w64), .co(s3_w65));
  full_adder u_fa33 (.a(s2_w49), .b(s2_w50), .ci(pp[6][4]), .s(s3_w66), .co(s3_w67));
  full_adder u_fa34 (.a(s2_w53), .b(s1_w29), .ci(s1_w30), .s(s3_w68), .co(s3_w69));
  // ---- reduction stage 4 ----
  full_adder u_fa35 (.a(s3_w57), .b(s2_w35), .ci(s2_w36), .s(s4_w70), .co(s4_w71));
  half_adder u_ha36 (.a(s3_w58), .b(pp[6][0]), .s(s4_w72), .c(s4_w73));
  half_adder u_ha37 (.a(s3_w59), .b(s3_w60), .s(s4_w74), .c(s4_w75));
  full_adder u_fa38 (.a(s3_w61), .b(s3_w62), .ci(s2_w46), .s(s4_w76), .co(s4_w77));
  full_adder u_fa39 (.a(s3_w63), .b(s3_w64), .ci(s1_w24), .s(s4_w78), .co(s4_w79));
  full_adder u_fa40 (.a(s3_w65), .b(s3_w66), .ci(pp[7][3]), .s(s4_w80), .co(s4_w81));
  full_adder u_fa41 (.a(s3_w67), .b(s2_w51), .ci(s2_w52), .s(s4_w82), .co(s4_w83));

  // ---- final two rows ----
  assign row0[0] = pp[0][0];
  assign row1[0] = 1'b0;
  assign row0[1] = pp[0][1];
  assign row1[1] = pp[1][0];
  assign row0[2] = s1_w0;
  assign row1[2] = 1'b0;
  assign row0[3] = s2_w32;
  assign row1[3] = 1'b0;
  assign row0[4] = s3_w56;
  assign row1[4] = 1'b0;
  assign row0[5] = s4_w70;
  assign row1[5] = 1'b0;
  assign row0[6] = s4_w71;
  assign row1[6] = s4_w72;
  assign row0[7] = s4_w73;
  assign row1[7] = s4_w74;
  assign row0[8] = s4_w75;
  assign row1[8] = s4_w76;
  assign row0[9] = s4_w77;
  assign row1[9] = s4_w78;
  assign row0[10] = s4_w79;
  assign row1[10] = s4_w80;
  assign row0[11] = s4_w81;
  assign row1[11] = s4_w82;
  assign row0[12] = s4_w83;
  assign row1[12] = s3_w68;
  assign row0[13] = s3_w69;
  assign row1[13] = s2_w54;
  assign row0[14] = s2_w55;
  assign row1[14] = pp[7][7];
  assign row0[15] = 1'b0;
  assign row1[15] = 1'b0;
endmodule
