// 5-3 compressor: counts the ones among five bits i[4:0] (i1..i5) of weight
// j and returns the count on x[2:0] (x1..x3) of weights j, j+1, j+2.
// i5, i4 go through a half adder and i3, i2, i1 through a full adder; a
// small parallel-addition block adds the two 2-bit results. That block is
// this design's own: a half adder on the two sum bits gives x1, a full adder
// on the two carries and the half adder's carry gives x2 and x3.
// Combinational.
module comp_5_3 (
  input  logic [4:0] i,     // i[0] = i1 ... i[4] = i5
  output logic [2:0] x      // x[0] = x1 (LSB) ... x[2] = x3 (MSB)
);
  logic hs, hc, fs, fc, k;
  half_adder u_ha (.a(i[4]), .b(i[3]), .s(hs), .c(hc));
  full_adder u_fa (.a(i[2]), .b(i[1]), .ci(i[0]), .s(fs), .co(fc));
  // parallel addition of {hc,hs} + {fc,fs}
  half_adder u_pa0 (.a(hs), .b(fs), .s(x[0]), .c(k));
  full_adder u_pa1 (.a(hc), .b(fc), .ci(k), .s(x[1]), .co(x[2]));
endmodule
