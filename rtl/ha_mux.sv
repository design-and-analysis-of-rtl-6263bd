// Half-adder multiplexer: a W-bit 2:1 selector, y = s ? b : a, built only
// from half adders and one XOR per bit, in the arrangement of the adder-based
// multiplexer proposed for the carry-select groups of the modified carry save
// adder. Per bit: (a, s^1) into a half adder whose carry is a&~s; (s, b) into
// a half adder whose carry is b&s; a third half adder XORs the two products,
// which never are both 1, so the XOR equals their OR.
// Combinational; the select s is shared by all bits.
module ha_mux #(
  parameter int W = 4
) (
  input  logic [W-1:0] a,   // chosen when s = 0
  input  logic [W-1:0] b,   // chosen when s = 1
  input  logic         s,
  output logic [W-1:0] y
);
  logic s_n;
  assign s_n = 1'b1 ^ s;    // XOR with constant 1 as drawn: inverts s

  for (genvar i = 0; i < W; i++) begin : g_bit
    logic a_sn, b_s, unused_s0, unused_s1, unused_c2;
    half_adder u_ha_a (.a(a[i]), .b(s_n),  .s(unused_s0), .c(a_sn));
    half_adder u_ha_b (.a(s),    .b(b[i]), .s(unused_s1), .c(b_s));
    half_adder u_ha_o (.a(a_sn), .b(b_s),  .s(y[i]),      .c(unused_c2));
  end
endmodule
