// Ripple-carry adder: s = a + b, W bits each, with the carry out as s[W].
// A chain of full adders; the conventional final adder of the Dadda and the
// compressor multipliers. Combinational.
module rca #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W:0]   s
);
  logic [W:0] c;
  assign c[0] = 1'b0;
  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end
  assign s[W] = c[W];
endmodule
