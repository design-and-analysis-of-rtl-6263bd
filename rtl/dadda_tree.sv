// Dadda reduction tree for an 8x8 unsigned multiplier. It reduces the 64
// AND-gate partial products to two rows with as few adders per stage as
// possible. The stage heights come from d1 = 2, d(j+1) = floor(1.5 * dj),
// giving 2, 3, 4, 6; an 8-high matrix takes four stages: 8 -> 6 -> 4 -> 3 ->
// 2. In each stage, columns are visited least significant first; a column
// whose height (its own bits plus the carries it receives in this stage)
// exceeds the stage target gets a half adder if it is one over, otherwise a
// full adder, until it meets the target. This gives the classic count of
// 35 full adders and 7 half adders. The netlist below was produced by a
// generator that applies exactly this rule and is checked exhaustively.
// Combinational.
module dadda_tree (
  input  logic [7:0][7:0] pp,   // pp[i][j] = b[i] & a[j], weight i+j
  output logic [15:0]       row0,   // first bit of each final column
  output logic [15:0]       row1    // second bit, 0 where the column has one
);
  // stage 1 outputs
  logic s1_w0, s1_w1, s1_w2, s1_w3, s1_w4, s1_w5, s1_w6, s1_w7;
  logic s1_w8, s1_w9, s1_w10, s1_w11;
  // stage 2 outputs
  logic s2_w12, s2_w13, s2_w14, s2_w15, s2_w16, s2_w17, s2_w18, s2_w19;
  logic s2_w20, s2_w21, s2_w22, s2_w23, s2_w24, s2_w25, s2_w26, s2_w27;
  logic s2_w28, s2_w29, s2_w30, s2_w31, s2_w32, s2_w33, s2_w34, s2_w35;
  logic s2_w36, s2_w37, s2_w38, s2_w39;
  // stage 3 outputs
  logic s3_w40, s3_w41, s3_w42, s3_w43, s3_w44, s3_w45, s3_w46, s3_w47;
  logic s3_w48, s3_w49, s3_w50, s3_w51, s3_w52, s3_w53, s3_w54, s3_w55;
  logic s3_w56, s3_w57, s3_w58, s3_w59;
  // stage 4 outputs
  logic s4_w60, s4_w61, s4_w62, s4_w63, s4_w64, s4_w65, s4_w66, s4_w67;
  logic s4_w68, s4_w69, s4_w70, s4_w71, s4_w72, s4_w73, s4_w74, s4_w75;
  logic s4_w76, s4_w77, s4_w78, s4_w79, s4_w80, s4_w81, s4_w82, s4_w83;

  // ---- reduction stage 1 ----
  half_adder u_ha0 (.a(pp[0][6]), .b(pp[1][5]), .s(s1_w0), .c(s1_w1));
  full_adder u_fa1 (.a(pp[0][7]), .b(pp[1][6]), .ci(pp[2][5]), .s(s1_w2), .co(s1_w3));
  half_adder u_ha2 (.a(pp[3][4]), .b(pp[4][3]), .s(s1_w4), .c(s1_w5));
  full_adder u_fa3 (.a(pp[1][7]), .b(pp[2][6]), .ci(pp[3][5]), .s(s1_w6), .co(s1_w7));
  half_adder u_ha4 (.a(pp[4][4]), .b(pp[5][3]), .s(s1_w8), .c(s1_w9));
  full_adder u_fa5 (.a(pp[2][7]), .b(pp[3][6]), .ci(pp[4][5]), .s(s1_w10), .co(s1_w11));
  // ---- reduction stage 2 ----
  half_adder u_ha6 (.a(pp[0][4]), .b(pp[1][3]), .s(s2_w12), .c(s2_w13));
  full_adder u_fa7 (.a(pp[0][5]), .b(pp[1][4]), .ci(pp[2][3]), .s(s2_w14), .co(s2_w15));
  half_adder u_ha8 (.a(pp[3][2]), .b(pp[4][1]), .s(s2_w16), .c(s2_w17));
  full_adder u_fa9 (.a(s1_w0), .b(pp[2][4]), .ci(pp[3][3]), .s(s2_w18), .co(s2_w19));
  full_adder u_fa10 (.a(pp[4][2]), .b(pp[5][1]), .ci(pp[6][0]), .s(s2_w20), .co(s2_w21));
  full_adder u_fa11 (.a(s1_w1), .b(s1_w2), .ci(s1_w4), .s(s2_w22), .co(s2_w23));
  full_adder u_fa12 (.a(pp[5][2]), .b(pp[6][1]), .ci(pp[7][0]), .s(s2_w24), .co(s2_w25));
  full_adder u_fa13 (.a(s1_w3), .b(s1_w5), .ci(s1_w6), .s(s2_w26), .co(s2_w27));
  full_adder u_fa14 (.a(s1_w8), .b(pp[6][2]), .ci(pp[7][1]), .s(s2_w28), .co(s2_w29));
  full_adder u_fa15 (.a(s1_w7), .b(s1_w9), .ci(s1_w10), .s(s2_w30), .co(s2_w31));
  full_adder u_fa16 (.a(pp[5][4]), .b(pp[6][3]), .ci(pp[7][2]), .s(s2_w32), .co(s2_w33));
  full_adder u_fa17 (.a(s1_w11), .b(pp[3][7]), .ci(pp[4][6]), .s(s2_w34), .co(s2_w35));
  full_adder u_fa18 (.a(pp[5][5]), .b(pp[6][4]), .ci(pp[7][3]), .s(s2_w36), .co(s2_w37));
  full_adder u_fa19 (.a(pp[4][7]), .b(pp[5][6]), .ci(pp[6][5]), .s(s2_w38), .co(s2_w39));
  // ---- reduction stage 3 ----
  half_adder u_ha20 (.a(pp[0][3]), .b(pp[1][2]), .s(s3_w40), .c(s3_w41));
  full_adder u_fa21 (.a(s2_w12), .b(pp[2][2]), .ci(pp[3][1]), .s(s3_w42), .co(s3_w43));
  full_adder u_fa22 (.a(s2_w13), .b(s2_w14), .ci(s2_w16), .s(s3_w44), .co(s3_w45));
  full_adder u_fa23 (.a(s2_w15), .b(s2_w17), .ci(s2_w18), .s(s3_w46), .co(s3_w47));
  full_adder u_fa24 (.a(s2_w19), .b(s2_w21), .ci(s2_w22), .s(s3_w48), .co(s3_w49));
  full_adder u_fa25 (.a(s2_w23), .b(s2_w25), .ci(s2_w26), .s(s3_w50), .co(s3_w51));
  full_adder u_fa26 (.a(s2_w27), .b(s2_w29), .ci(s2_w30), .s(s3_w52), .co(s3_w53));
  full_adder u_fa27 (.a(s2_w31), .b(s2_w33), .ci(s2_w34), .s(s3_w54), .co(s3_w55));
  full_adder u_fa28 (.a(s2_w35), .b(s2_w37), .ci(s2_w38), .s(s3_w56), .co(s3_w57));
  full_adder u_fa29 (.a(s2_w39), .b(pp[5][7]), .ci(pp[6][6]), .s(s3_w58), .co(s3_w59));
  // ---- reduction stage 4 ----
  half_adder u_ha30 (.a(pp[0][2]), .b(pp[1][1]), .s(s4_w60), .c(s4_w61));
  full_adder u_fa31 (.a(s3_w40), .b(pp[2][1]), .ci(pp[3][0]), .s(s4_w62), .co(s4_w63));
  full_adder u_fa32 (.a(s3_w41), .b(s3_w42), .ci(pp[4][0]), .s(s4_w64), .co(s4_w65));
  full_adder u_fa33 (.a(s3_w43), .b(s3_w44), .ci(pp[5][0]), .s(s4_w66), .co(s4_w67));
  full_adder u_fa34 (.a(s3_w45), .b(s3_w46), .ci(s2_w20), .s(s4_w68), .co(s4_w69));
  full_adder u_fa35 (.a(s3_w47), .b(s3_w48), .ci(s2_w24), .s(s4_w70), .co(s4_w71));
  full_adder u_fa36 (.a(s3_w49), .b(s3_w50), .ci(s2_w28), .s(s4_w72), .co(s4_w73));
  full_adder u_fa37 (.a(s3_w51), .b(s3_w52), .ci(s2_w32), .s(s4_w74), .co(s4_w75));
  full_adder u_fa38 (.a(s3_w53), .b(s3_w54), .ci(s2_w36), .s(s4_w76), .co(s4_w77));
  full_adder u_fa39 (.a(s3_w55), .b(s3_w56), .ci(pp[7][4]), .s(s4_w78), .co(s4_w79));
  full_adder u_fa40 (.a(s3_w57), .b(s3_w58), .ci(pp[7][5]), .s(s4_w80), .co(s4_w81));
  full_adder u_fa41 (.a(s3_w59), .b(pp[6][7]), .ci(pp[7][6]), .s(s4_w82), .co(s4_w83));

  // ---- final two rows ----
  assign row0[0] = pp[0][0];
  assign row1[0] = 1'b0;
  assign row0[1] = pp[0][1];
  assign row1[1] = pp[1][0];
  assign row0[2] = s4_w60;
  assign row1[2] = pp[2][0];
  assign row0[3] = s4_w61;
  assign row1[3] = s4_w62;
  assign row0[4] = s4_w63;
  assign row1[4] = s4_w64;
  assign row0[5] = s4_w65;
  assign row1[5] = s4_w66;
  assign row0[6] = s4_w67;
  assign row1[6] = s4_w68;
  assign row0[7] = s4_w69;
  assign row1[7] = s4_w70;
  assign row0[8] = s4_w71;
  assign row1[8] = s4_w72;
  assign row0[9] = s4_w73;
  assign row1[9] = s4_w74;
  assign row0[10] = s4_w75;
  assign row1[10] = s4_w76;
  assign row0[11] = s4_w77;
  assign row1[11] = s4_w78;
  assign row0[12] = s4_w79;
  assign row1[12] = s4_w80;
  assign row0[13] = s4_w81;
  assign row1[13] = s4_w82;
  assign row0[14] = s4_w83;
  assign row1[14] = pp[7][7];
  assign row0[15] = 1'b0;
  assign row1[15] = 1'b0;
endmodule
