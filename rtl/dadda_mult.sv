// Dadda multiplier: 8-bit unsigned a times b, 16-bit product.
// The 64 AND-gate partial products are reduced by dadda_tree (stage heights
// 6, 4, 3, 2) to two rows, which a ripple-carry adder adds. The reduction
// follows the document; it does not name a final adder for this multiplier,
// so the conventional ripple-carry adder is this design's choice.
// Combinational, no clock.
module dadda_mult
  import mult_pkg::*;
(
  input  logic [OP_W-1:0] a,        // multiplicand
  input  logic [OP_W-1:0] b,        // multiplier
  output logic [PR_W-1:0] product
);
  logic [OP_W-1:0][OP_W-1:0] pp;
  for (genvar i = 0; i < OP_W; i++) begin : g_pp
    assign pp[i] = a & {OP_W{b[i]}};
  end

  logic [PR_W-1:0] row0, row1;
  dadda_tree u_tree (.pp(pp), .row0(row0), .row1(row1));

  logic [PR_W:0] total;
  rca #(.W(PR_W)) u_add (.a(row0), .b(row1), .s(total));
  assign product = total[PR_W-1:0];   // an 8x8 product never carries out
endmodule
