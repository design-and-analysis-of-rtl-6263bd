// Compressor reduction tree for a 16x16 unsigned multiplier: the larger
// version of the compressor multiplier, built with the same 4-3, 5-3, 6-3
// and 7-3 compressors and the same schedule as comp_tree. While some column
// is taller than three bits, each column feeds as many bits as possible (at
// most seven) to one compressor per pass, repeats while four or more bits
// are left, puts three leftover bits into a full adder and passes one or two
// on; each compressor's outputs go to columns j, j+1, j+2 of the next stage.
// Column 9, which holds ten bits, so gets one 7-3 compressor and one full
// adder. A last stage of full and half adders takes the matrix to two rows.
// With this schedule the 256 partial products need four stages (three of
// compressors, one of adders), one fewer than the five of the published
// 16-bit tree, whose exact layout is not reproduced. Bits that would land
// in column 32 or above are always zero and are dropped. The netlist below
// was produced by a generator applying exactly this schedule and checked on
// corner cases and 20,000 random operand pairs. Combinational.
module comp16_tree (
  input  logic [15:0][15:0] pp,   // pp[i][j] = b[i] & a[j], weight i+j
  output logic [31:0]       row0,   // first bit of each final column
  output logic [31:0]       row1    // second bit, 0 where the column has one
);
  // stage 1 outputs
  logic s1_w0, s1_w1, s1_w2, s1_w3, s1_w4, s1_w5, s1_w6, s1_w7;
  logic s1_w8, s1_w9, s1_w10, s1_w11, s1_w12, s1_w13, s1_w14, s1_w15;
  logic s1_w16, s1_w17, s1_w18, s1_w19, s1_w20, s1_w21, s1_w22, s1_w23;
  logic s1_w24, s1_w25, s1_w26, s1_w27, s1_w28, s1_w29, s1_w30, s1_w31;
  logic s1_w32, s1_w33, s1_w34, s1_w35, s1_w36, s1_w37, s1_w38, s1_w39;
  logic s1_w40, s1_w41, s1_w42, s1_w43, s1_w44, s1_w45, s1_w46, s1_w47;
  logic s1_w48, s1_w49, s1_w50, s1_w51, s1_w52, s1_w53, s1_w54, s1_w55;
  logic s1_w56, s1_w57, s1_w58, s1_w59, s1_w60, s1_w61, s1_w62, s1_w63;
  logic s1_w64, s1_w65, s1_w66, s1_w67, s1_w68, s1_w69, s1_w70, s1_w71;
  logic s1_w72, s1_w73, s1_w74, s1_w75, s1_w76, s1_w77, s1_w78, s1_w79;
  logic s1_w80, s1_w81, s1_w82, s1_w83, s1_w84, s1_w85, s1_w86, s1_w87;
  logic s1_w88, s1_w89, s1_w90, s1_w91, s1_w92, s1_w93, s1_w94, s1_w95;
  logic s1_w96, s1_w97, s1_w98, s1_w99, s1_w100, s1_w101, s1_w102, s1_w103;
  logic s1_w104, s1_w105, s1_w106, s1_w107, s1_w108, s1_w109, s1_w110, s1_w111;
  logic s1_w112, s1_w113, s1_w114, s1_w115;
  // stage 2 outputs
  logic s2_w116, s2_w117, s2_w118, s2_w119, s2_w120, s2_w121, s2_w122, s2_w123;
  logic s2_w124, s2_w125, s2_w126, s2_w127, s2_w128, s2_w129, s2_w130, s2_w131;
  logic s2_w132, s2_w133, s2_w134, s2_w135, s2_w136, s2_w137, s2_w138, s2_w139;
  logic s2_w140, s2_w141, s2_w142, s2_w143, s2_w144, s2_w145, s2_w146, s2_w147;
  logic s2_w148, s2_w149, s2_w150, s2_w151, s2_w152, s2_w153, s2_w154, s2_w155;
  logic s2_w156, s2_w157, s2_w158, s2_w159, s2_w160, s2_w161, s2_w162, s2_w163;
  logic s2_w164, s2_w165, s2_w166, s2_w167, s2_w168, s2_w169, s2_w170, s2_w171;
  logic s2_w172, s2_w173, s2_w174, s2_w175, s2_w176, s2_w177, s2_w178, s2_w179;
  logic s2_w180, s2_w181, s2_w182, s2_w183;
  // stage 3 outputs
  logic s3_w184, s3_w185, s3_w186, s3_w187, s3_w188, s3_w189, s3_w190, s3_w191;
  logic s3_w192, s3_w193, s3_w194, s3_w195, s3_w196, s3_w197, s3_w198, s3_w199;
  logic s3_w200, s3_w201, s3_w202, s3_w203, s3_w204, s3_w205, s3_w206, s3_w207;
  logic s3_w208, s3_w209, s3_w210, s3_w211, s3_w212, s3_w213, s3_w214, s3_w215;
  logic s3_w216, s3_w217, s3_w218;
  // stage 4 outputs
  logic s4_w219, s4_w220, s4_w221, s4_w222, s4_w223, s4_w224, s4_w225, s4_w226;
  logic s4_w227, s4_w228, s4_w229, s4_w230, s4_w231, s4_w232, s4_w233, s4_w234;
  logic s4_w235, s4_w236, s4_w237, s4_w238, s4_w239, s4_w240, s4_w241, s4_w242;
  logic s4_w243, s4_w244, s4_w245, s4_w246;

  // ---- reduction stage 1 ----
  full_adder u_fa0 (.a(pp[0][2]), .b(pp[1][1]), .ci(pp[2][0]), .s(s1_w0), .co(s1_w1));
  comp_4_3 u_c43_1 (.x({pp[3][0], pp[2][1], pp[1][2], pp[0][3]}), .cin(1'b0), .s({s1_w4, s1_w3, s1_w2}));
  comp_5_3 u_c53_2 (.i({pp[4][0], pp[3][1], pp[2][2], pp[1][3], pp[0][4]}), .x({s1_w7, s1_w6, s1_w5}));
  comp_6_3 u_c63_3 (.i({pp[5][0], pp[4][1], pp[3][2], pp[2][3], pp[1][4], pp[0][5]}), .x({s1_w10, s1_w9, s1_w8}));
  comp_7_3 u_c73_4 (.i({pp[6][0], pp[5][1], pp[4][2], pp[3][3], pp[2][4], pp[1][5], pp[0][6]}), .x({s1_w13, s1_w12, s1_w11}));
  comp_7_3 u_c73_5 (.i({pp[6][1], pp[5][2], pp[4][3], pp[3][4], pp[2][5], pp[1][6], pp[0][7]}), .x({s1_w16, s1_w15, s1_w14}));
  comp_7_3 u_c73_6 (.i({pp[6][2], pp[5][3], pp[4][4], pp[3][5], pp[2][6], pp[1][7], pp[0][8]}), .x({s1_w19, s1_w18, s1_w17}));
  comp_7_3 u_c73_7 (.i({pp[6][3], pp[5][4], pp[4][5], pp[3][6], pp[2][7], pp[1][8], pp[0][9]}), .x({s1_w22, s1_w21, s1_w20}));
  full_adder u_fa8 (.a(pp[7][2]), .b(pp[8][1]), .ci(pp[9][0]), .s(s1_w23), .co(s1_w24));
  comp_7_3 u_c73_9 (.i({pp[6][4], pp[5][5], pp[4][6], pp[3][7], pp[2][8], pp[1][9], pp[0][10]}), .x({s1_w27, s1_w26, s1_w25}));
  comp_4_3 u_c43_10 (.x({pp[10][0], pp[9][1], pp[8][2], pp[7][3]}), .cin(1'b0), .s({s1_w30, s1_w29, s1_w28}));
  comp_7_3 u_c73_11 (.i({pp[6][5], pp[5][6], pp[4][7], pp[3][8], pp[2][9], pp[1][10], pp[0][11]}), .x({s1_w33, s1_w32, s1_w31}));
  comp_5_3 u_c53_12 (.i({pp[11][0], pp[10][1], pp[9][2], pp[8][3], pp[7][4]}), .x({s1_w36, s1_w35, s1_w34}));
  comp_7_3 u_c73_13 (.i({pp[6][6], pp[5][7], pp[4][8], pp[3][9], pp[2][10], pp[1][11], pp[0][12]}), .x({s1_w39, s1_w38, s1_w37}));
  comp_6_3 u_c63_14 (.i({pp[12][0], pp[11][1], pp[10][2], pp[9][3], pp[8][4], pp[7][5]}), .x({s1_w42, s1_w41, s1_w40}));
  comp_7_3 u_c73_15 (.i({pp[6][7], pp[5][8], pp[4][9], pp[3][10], pp[2][11], pp[1][12], pp[0][13]}), .x({s1_w45, s1_w44, s1_w43}));
  comp_7_3 u_c73_16 (.i({pp[13][0], pp[12][1], pp[11][2], pp[10][3], pp[9][4], pp[8][5], pp[7][6]}), .x({s1_w48, s1_w47, s1_w46}));
  comp_7_3 u_c73_17 (.i({pp[6][8], pp[5][9], pp[4][10], pp[3][11], pp[2][12], pp[1][13], pp[0][14]}), .x({s1_w51, s1_w50, s1_w49}));
  comp_7_3 u_c73_18 (.i({pp[13][1], pp[12][2], pp[11][3], pp[10][4], pp[9][5], pp[8][6], pp[7][7]}), .x({s1_w54, s1_w53, s1_w52}));
  comp_7_3 u_c73_19 (.i({pp[6][9], pp[5][10], pp[4][11], pp[3][12], pp[2][13], pp[1][14], pp[0][15]}), .x({s1_w57, s1_w56, s1_w55}));
  comp_7_3 u_c73_20 (.i({pp[13][2], pp[12][3], pp[11][4], pp[10][5], pp[9][6], pp[8][7], pp[7][8]}), .x({s1_w60, s1_w59, s1_w58}));
  comp_7_3 u_c73_21 (.i({pp[7][9], pp[6][10], pp[5][11], pp[4][12], pp[3][13], pp[2][14], pp[1][15]}), .x({s1_w63, s1_w62, s1_w61}));
  comp_7_3 u_c73_22 (.i({pp[14][2], pp[13][3], pp[12][4], pp[11][5], pp[10][6], pp[9][7], pp[8][8]}), .x({s1_w66, s1_w65, s1_w64}));
  comp_7_3 u_c73_23 (.i({pp[8][9], pp[7][10], pp[6][11], pp[5][12], pp[4][13], pp[3][14], pp[2][15]}), .x({s1_w69, s1_w68, s1_w67}));
  comp_7_3 u_c73_24 (.i({pp[15][2], pp[14][3], pp[13][4], pp[12][5], pp[11][6], pp[10][7], pp[9][8]}), .x({s1_w72, s1_w71, s1_w70}));
  comp_7_3 u_c73_25 (.i({pp[9][9], pp[8][10], pp[7][11], pp[6][12], pp[5][13], pp[4][14], pp[3][15]}), .x({s1_w75, s1_w74, s1_w73}));
  comp_6_3 u_c63_26 (.i({pp[15][3], pp[14][4], pp[13][5], pp[12][6], pp[11][7], pp[10][8]}), .x({s1_w78, s1_w77, s1_w76}));
  comp_7_3 u_c73_27 (.i({pp[10][9], pp[9][10], pp[8][11], pp[7][12], pp[6][13], pp[5][14], pp[4][15]}), .x({s1_w81, s1_w80, s1_w79}));
  comp_5_3 u_c53_28 (.i({pp[15][4], pp[14][5], pp[13][6], pp[12][7], pp[11][8]}), .x({s1_w84, s1_w83, s1_w82}));
  comp_7_3 u_c73_29 (.i({pp[11][9], pp[10][10], pp[9][11], pp[8][12], pp[7][13], pp[6][14], pp[5][15]}), .x({s1_w87, s1_w86, s1_w85}));
  comp_4_3 u_c43_30 (.x({pp[15][5], pp[14][6], pp[13][7], pp[12][8]}), .cin(1'b0), .s({s1_w90, s1_w89, s1_w88}));
  comp_7_3 u_c73_31 (.i({pp[12][9], pp[11][10], pp[10][11], pp[9][12], pp[8][13], pp[7][14], pp[6][15]}), .x({s1_w93, s1_w92, s1_w91}));
  full_adder u_fa32 (.a(pp[13][8]), .b(pp[14][7]), .ci(pp[15][6]), .s(s1_w94), .co(s1_w95));
  comp_7_3 u_c73_33 (.i({pp[13][9], pp[12][10], pp[11][11], pp[10][12], pp[9][13], pp[8][14], pp[7][15]}), .x({s1_w98, s1_w97, s1_w96}));
  comp_7_3 u_c73_34 (.i({pp[14][9], pp[13][10], pp[12][11], pp[11][12], pp[10][13], pp[9][14], pp[8][15]}), .x({s1_w101, s1_w100, s1_w99}));
  comp_7_3 u_c73_35 (.i({pp[15][9], pp[14][10], pp[13][11], pp[12][12], pp[11][13], pp[10][14], pp[9][15]}), .x({s1_w104, s1_w103, s1_w102}));
  comp_6_3 u_c63_36 (.i({pp[15][10], pp[14][11], pp[13][12], pp[12][13], pp[11][14], pp[10][15]}), .x({s1_w107, s1_w106, s1_w105}));
  comp_5_3 u_c53_37 (.i({pp[15][11], pp[14][12], pp[13][13], pp[12][14], pp[11][15]}), .x({s1_w110, s1_w109, s1_w108}));
  comp_4_3 u_c43_38 (.x({pp[15][12], pp[14][13], pp[13][14], pp[12][15]}), .cin(1'b0), .s({s1_w113, s1_w112, s1_w111}));
  full_adder u_fa39 (.a(pp[13][15]), .b(pp[14][14]), .ci(pp[15][13]), .s(s1_w114), .co(s1_w115));
  // ---- reduction stage 2 ----
  full_adder u_fa40 (.a(s1_w4), .b(s1_w6), .ci(s1_w8), .s(s2_w116), .co(s2_w117));
  full_adder u_fa41 (.a(s1_w7), .b(s1_w9), .ci(s1_w11), .s(s2_w118), .co(s2_w119));
  comp_4_3 u_c43_42 (.x({pp[7][0], s1_w14, s1_w12, s1_w10}), .cin(1'b0), .s({s2_w122, s2_w121, s2_w120}));
  comp_5_3 u_c53_43 (.i({pp[8][0], pp[7][1], s1_w17, s1_w15, s1_w13}), .x({s2_w125, s2_w124, s2_w123}));
  comp_4_3 u_c43_44 (.x({s1_w23, s1_w20, s1_w18, s1_w16}), .cin(1'b0), .s({s2_w128, s2_w127, s2_w126}));
  comp_5_3 u_c53_45 (.i({s1_w28, s1_w25, s1_w24, s1_w21, s1_w19}), .x({s2_w131, s2_w130, s2_w129}));
  comp_5_3 u_c53_46 (.i({s1_w34, s1_w31, s1_w29, s1_w26, s1_w22}), .x({s2_w134, s2_w133, s2_w132}));
  comp_6_3 u_c63_47 (.i({s1_w40, s1_w37, s1_w35, s1_w32, s1_w30, s1_w27}), .x({s2_w137, s2_w136, s2_w135}));
  comp_6_3 u_c63_48 (.i({s1_w46, s1_w43, s1_w41, s1_w38, s1_w36, s1_w33}), .x({s2_w140, s2_w139, s2_w138}));
  comp_7_3 u_c73_49 (.i({pp[14][0], s1_w52, s1_w49, s1_w47, s1_w44, s1_w42, s1_w39}), .x({s2_w143, s2_w142, s2_w141}));
  comp_7_3 u_c73_50 (.i({pp[14][1], s1_w58, s1_w55, s1_w53, s1_w50, s1_w48, s1_w45}), .x({s2_w146, s2_w145, s2_w144}));
  comp_7_3 u_c73_51 (.i({pp[15][1], s1_w64, s1_w61, s1_w59, s1_w56, s1_w54, s1_w51}), .x({s2_w149, s2_w148, s2_w147}));
  comp_6_3 u_c63_52 (.i({s1_w70, s1_w67, s1_w65, s1_w62, s1_w60, s1_w57}), .x({s2_w152, s2_w151, s2_w150}));
  comp_6_3 u_c63_53 (.i({s1_w76, s1_w73, s1_w71, s1_w68, s1_w66, s1_w63}), .x({s2_w155, s2_w154, s2_w153}));
  comp_6_3 u_c63_54 (.i({s1_w82, s1_w79, s1_w77, s1_w74, s1_w72, s1_w69}), .x({s2_w158, s2_w157, s2_w156}));
  comp_6_3 u_c63_55 (.i({s1_w88, s1_w85, s1_w83, s1_w80, s1_w78, s1_w75}), .x({s2_w161, s2_w160, s2_w159}));
  comp_6_3 u_c63_56 (.i({s1_w94, s1_w91, s1_w89, s1_w86, s1_w84, s1_w81}), .x({s2_w164, s2_w163, s2_w162}));
  comp_7_3 u_c73_57 (.i({pp[15][7], pp[14][8], s1_w96, s1_w95, s1_w92, s1_w90, s1_w87}), .x({s2_w167, s2_w166, s2_w165}));
  comp_4_3 u_c43_58 (.x({pp[15][8], s1_w99, s1_w97, s1_w93}), .cin(1'b0), .s({s2_w170, s2_w169, s2_w168}));
  full_adder u_fa59 (.a(s1_w98), .b(s1_w100), .ci(s1_w102), .s(s2_w171), .co(s2_w172));
  full_adder u_fa60 (.a(s1_w101), .b(s1_w103), .ci(s1_w105), .s(s2_w173), .co(s2_w174));
  full_adder u_fa61 (.a(s1_w104), .b(s1_w106), .ci(s1_w108), .s(s2_w175), .co(s2_w176));
  full_adder u_fa62 (.a(s1_w107), .b(s1_w109), .ci(s1_w111), .s(s2_w177), .co(s2_w178));
  full_adder u_fa63 (.a(s1_w110), .b(s1_w112), .ci(s1_w114), .s(s2_w179), .co(s2_w180));
  comp_4_3 u_c43_64 (.x({pp[15][14], pp[14][15], s1_w115, s1_w113}), .cin(1'b0), .s({s2_w183, s2_w182, s2_w181}));
  // ---- reduction stage 3 ----
  full_adder u_fa65 (.a(s2_w122), .b(s2_w124), .ci(s2_w126), .s(s3_w184), .co(s3_w185));
  full_adder u_fa66 (.a(s2_w125), .b(s2_w127), .ci(s2_w129), .s(s3_w186), .co(s3_w187));
  full_adder u_fa67 (.a(s2_w128), .b(s2_w130), .ci(s2_w132), .s(s3_w188), .co(s3_w189));
  full_adder u_fa68 (.a(s2_w131), .b(s2_w133), .ci(s2_w135), .s(s3_w190), .co(s3_w191));
  full_adder u_fa69 (.a(s2_w134), .b(s2_w136), .ci(s2_w138), .s(s3_w192), .co(s3_w193));
  full_adder u_fa70 (.a(s2_w137), .b(s2_w139), .ci(s2_w141), .s(s3_w194), .co(s3_w195));
  comp_4_3 u_c43_71 (.x({pp[15][0], s2_w144, s2_w142, s2_w140}), .cin(1'b0), .s({s3_w198, s3_w197, s3_w196}));
  full_adder u_fa72 (.a(s2_w143), .b(s2_w145), .ci(s2_w147), .s(s3_w199), .co(s3_w200));
  full_adder u_fa73 (.a(s2_w146), .b(s2_w148), .ci(s2_w150), .s(s3_w201), .co(s3_w202));
  full_adder u_fa74 (.a(s2_w149), .b(s2_w151), .ci(s2_w153), .s(s3_w203), .co(s3_w204));
  full_adder u_fa75 (.a(s2_w152), .b(s2_w154), .ci(s2_w156), .s(s3_w205), .co(s3_w206));
  full_adder u_fa76 (.a(s2_w155), .b(s2_w157), .ci(s2_w159), .s(s3_w207), .co(s3_w208));
  full_adder u_fa77 (.a(s2_w158), .b(s2_w160), .ci(s2_w162), .s(s3_w209), .co(s3_w210));
  full_adder u_fa78 (.a(s2_w161), .b(s2_w163), .ci(s2_w165), .s(s3_w211), .co(s3_w212));
  full_adder u_fa79 (.a(s2_w164), .b(s2_w166), .ci(s2_w168), .s(s3_w213), .co(s3_w214));
  full_adder u_fa80 (.a(s2_w167), .b(s2_w169), .ci(s2_w171), .s(s3_w215), .co(s3_w216));
  full_adder u_fa81 (.a(s2_w170), .b(s2_w172), .ci(s2_w173), .s(s3_w217), .co(s3_w218));
  // ---- reduction stage 4 ----
  full_adder u_fa82 (.a(s3_w198), .b(s3_w200), .ci(s3_w201), .s(s4_w219), .co(s4_w220));
  half_adder u_ha83 (.a(s3_w202), .b(s3_w203), .s(s4_w221), .c(s4_w222));
  half_adder u_ha84 (.a(s3_w204), .b(s3_w205), .s(s4_w223), .c(s4_w224));
  half_adder u_ha85 (.a(s3_w206), .b(s3_w207), .s(s4_w225), .c(s4_w226));
  half_adder u_ha86 (.a(s3_w208), .b(s3_w209), .s(s4_w227), .c(s4_w228));
  half_adder u_ha87 (.a(s3_w210), .b(s3_w211), .s(s4_w229), .c(s4_w230));
  half_adder u_ha88 (.a(s3_w212), .b(s3_w213), .s(s4_w231), .c(s4_w232));
  half_adder u_ha89 (.a(s3_w214), .b(s3_w215), .s(s4_w233), .c(s4_w234));
  half_adder u_ha90 (.a(s3_w216), .b(s3_w217), .s(s4_w235), .c(s4_w236));
  full_adder u_fa91 (.a(s3_w218), .b(s2_w174), .ci(s2_w175), .s(s4_w237), .co(s4_w238));
  half_adder u_ha92 (.a(s2_w176), .b(s2_w177), .s(s4_w239), .c(s4_w240));
  half_adder u_ha93 (.a(s2_w178), .b(s2_w179), .s(s4_w241), .c(s4_w242));
  half_adder u_ha94 (.a(s2_w180), .b(s2_w181), .s(s4_w243), .c(s4_w244));
  half_adder u_ha95 (.a(s2_w182), .b(pp[15][15]), .s(s4_w245), .c(s4_w246));

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
  assign row0[5] = s2_w116;
  assign row1[5] = 1'b0;
  assign row0[6] = s2_w117;
  assign row1[6] = s2_w118;
  assign row0[7] = s2_w119;
  assign row1[7] = s2_w120;
  assign row0[8] = s2_w121;
  assign row1[8] = s2_w123;
  assign row0[9] = s3_w184;
  assign row1[9] = 1'b0;
  assign row0[10] = s3_w185;
  assign row1[10] = s3_w186;
  assign row0[11] = s3_w187;
  assign row1[11] = s3_w188;
  assign row0[12] = s3_w189;
  assign row1[12] = s3_w190;
  assign row0[13] = s3_w191;
  assign row1[13] = s3_w192;
  assign row0[14] = s3_w193;
  assign row1[14] = s3_w194;
  assign row0[15] = s3_w195;
  assign row1[15] = s3_w196;
  assign row0[16] = s3_w197;
  assign row1[16] = s3_w199;
  assign row0[17] = s4_w219;
  assign row1[17] = 1'b0;
  assign row0[18] = s4_w220;
  assign row1[18] = s4_w221;
  assign row0[19] = s4_w222;
  assign row1[19] = s4_w223;
  assign row0[20] = s4_w224;
  assign row1[20] = s4_w225;
  assign row0[21] = s4_w226;
  assign row1[21] = s4_w227;
  assign row0[22] = s4_w228;
  assign row1[22] = s4_w229;
  assign row0[23] = s4_w230;
  assign row1[23] = s4_w231;
  assign row0[24] = s4_w232;
  assign row1[24] = s4_w233;
  assign row0[25] = s4_w234;
  assign row1[25] = s4_w235;
  assign row0[26] = s4_w236;
  assign row1[26] = s4_w237;
  assign row0[27] = s4_w238;
  assign row1[27] = s4_w239;
  assign row0[28] = s4_w240;
  assign row1[28] = s4_w241;
  assign row0[29] = s4_w242;
  assign row1[29] = s4_w243;
  assign row0[30] = s4_w244;
  assign row1[30] = s4_w245;
  assign row0[31] = s4_w246;
  assign row1[31] = s2_w183;
endmodule
