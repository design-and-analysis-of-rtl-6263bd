// 6-3 compressor: counts the ones among six bits i[5:0] of weight j and
// returns the count on x[2:0] of weights j, j+1, j+2. The internal structure
// is this design's own: two full adders on i[2:0] and i[5:3], a half adder
// on their sums gives x[0], and a full adder on the three weight-(j+1)
// carries gives x[1] and x[2]. Combinational.
module comp_6_3 (
  input  logic [5:0] i,
  output logic [2:0] x
);
  logic s_a, c_a, s_b, c_b, c_c;
  full_adder u_fa_a (.a(i[0]), .b(i[1]), .ci(i[2]), .s(s_a), .co(c_a));
  full_adder u_fa_b (.a(i[3]), .b(i[4]), .ci(i[5]), .s(s_b), .co(c_b));
  half_adder u_ha   (.a(s_a),  .b(s_b),             .s(x[0]), .c(c_c));
  full_adder u_fa_c (.a(c_a),  .b(c_b),  .ci(c_c),  .s(x[1]), .co(x[2]));
endmodule
