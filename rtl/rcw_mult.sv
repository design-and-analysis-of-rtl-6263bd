// Reduced-complexity Wallace multiplier with a modified carry save adder
// (MCSA) as final adder: 8-bit unsigned a (multiplicand) times b
// (multiplier), 16-bit product. This is the multiplier the design is built
// around.
//   1. 64 AND gates form the partial products pp[i][j] = b[i] & a[j].
//   2. rcw_tree reduces them in four stages of full adders (half adders only
//      where needed to keep the Wallace stage count) to two rows:
//      sum   = row0[14:0]            (weights 2^0 .. 2^14)
//      carry = row1[14:1]            (weights 2^1 .. 2^14; carry[k] has
//                                     weight 2^(k+1))
//      so that product = sum + 2 * carry. Bit 0 of the product is sum[0].
//   3. The 16-bit MCSA adds sum[14:1] and carry, giving result[14:0], and
//      product = {result, sum[0]}.
// sum, carry and result are brought out as well because they are the
// internal values shown for this multiplier in the document's simulation.
// Combinational, no clock.
module rcw_mult
  import mult_pkg::*;
(
  input  logic [OP_W-1:0]   a,        // multiplicand
  input  logic [OP_W-1:0]   b,        // multiplier
  output logic [PR_W-1:0]   product,
  output logic [PR_W-2:0]   sum,      // 15 bits
  output logic [PR_W-3:0]   carry,    // 14 bits
  output logic [PR_W-2:0]   result    // 15 bits: product[15:1]
);
  logic [OP_W-1:0][OP_W-1:0] pp;
  for (genvar i = 0; i < OP_W; i++) begin : g_pp
    assign pp[i] = a & {OP_W{b[i]}};
  end

  logic [PR_W-1:0] row0, row1;
  rcw_tree u_tree (.pp(pp), .row0(row0), .row1(row1));
  assign sum   = row0[PR_W-2:0];
  assign carry = row1[PR_W-2:1];

  logic [PR_W+1:0] total;
  mcsa #(.N(PR_W)) u_mcsa (
    .a  ({2'b00, sum[PR_W-2:1]}),
    .b  ({2'b00, carry}),
    .cin(1'b0),
    .sum(total)
  );
  assign result  = total[PR_W-2:0];
  assign product = {result, sum[0]};
endmodule
