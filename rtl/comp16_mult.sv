// 16x16 multiplier using compressors: 16-bit unsigned a times b, 32-bit
// product. The larger of the two compressor multipliers: 256 AND-gate
// partial products are reduced by comp16_tree (4-3 ... 7-3 compressors, then
// one stage of full and half adders) to two rows, which a 32-bit
// ripple-carry adder adds. The 16-bit size and the compressors follow the
// document; the tree schedule and the ripple-carry final adder are this
// design's own. Combinational, no clock.
module comp16_mult #(
  localparam int W = 16
) (
  input  logic [W-1:0]   a,        // multiplicand
  input  logic [W-1:0]   b,        // multiplier
  output logic [2*W-1:0] product
);
  logic [W-1:0][W-1:0] pp;
  for (genvar i = 0; i < W; i++) begin : g_pp
    assign pp[i] = a & {W{b[i]}};
  end

  logic [2*W-1:0] row0, row1;
  comp16_tree u_tree (.pp(pp), .row0(row0), .row1(row1));

  logic [2*W:0] total;
  rca #(.W(2*W)) u_add (.a(row0), .b(row1), .s(total));
  assign product = total[2*W-1:0];   // a 16x16 product never carries out
endmodule
