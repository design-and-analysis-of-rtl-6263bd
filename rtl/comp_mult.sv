// Multiplier using compressors (counters): 8-bit unsigned a times b,
// 16-bit product. The 64 AND-gate partial products are reduced by comp_tree
// with 4-3, 5-3, 6-3 and 7-3 compressors and a last stage of full and half
// adders to two rows, which a ripple-carry adder adds. The compressors and
// their use follow the document; the final adder is not named there, so the
// conventional ripple-carry adder is this design's choice.
// Combinational, no clock.
module comp_mult
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
  comp_tree u_tree (.pp(pp), .row0(row0), .row1(row1));

  logic [PR_W:0] total;
  rca #(.W(PR_W)) u_add (.a(row0), .b(row1), .s(total));
  assign product = total[PR_W-1:0];   // an 8x8 product never carries out
endmodule
