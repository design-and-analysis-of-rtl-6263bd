// Word-level 3:2 carry-save adder: a row of full adders that turns three
// W-bit words into a sum word and a carry word with a + b + c = s + cy
// (modulo 2^W). The carry word is already shifted up one place.
// Combinational; used to compress the Booth partial product rows.
module csa3 #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  logic [W-1:0] co;
  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(co[i]));
  end
  assign cy = {co[W-2:0], 1'b0};   // co[W-1] has weight 2^W: dropped
endmodule
