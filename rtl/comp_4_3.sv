// 4-3 compressor: counts the ones among four bits x[3:0] (x1..x4) and a
// carry-in bit of the same weight j, and returns the count on three bits
// s[2:0] of weights j, j+1, j+2. Structure as drawn for the modified 4-2
// compressor: a full adder on x1, x2, x3; a second full adder on its sum,
// x4 and cin gives s[0]; a half adder on the two weight-(j+1) carries gives
// s[1] and s[2]. Combinational.
module comp_4_3 (
  input  logic [3:0] x,     // x[0] = x1 ... x[3] = x4, all of weight j
  input  logic       cin,   // weight j
  output logic [2:0] s      // s[0] weight j, s[1] weight j+1, s[2] weight j+2
);
  logic s_a, c_a, c_b;
  full_adder u_fa1 (.a(x[0]), .b(x[1]), .ci(x[2]), .s(s_a),  .co(c_a));
  full_adder u_fa2 (.a(s_a),  .b(x[3]), .ci(cin),  .s(s[0]), .co(c_b));
  half_adder u_ha  (.a(c_a),  .b(c_b),             .s(s[1]), .c(s[2]));
endmodule
