// Multiplier suite: the four 8-bit unsigned multipliers (and the 16-bit
// compressor multiplier) of the comparison,
// side by side on the same operands, so they can be measured and checked
// against each other:
//   rcw    reduced-complexity Wallace tree + modified carry save adder
//          (the proposed multiplier), combinational; its internal sum,
//          carry and result vectors are brought out too
//   dadda  Dadda tree + ripple-carry adder, combinational
//   comp   4-3..7-3 compressor tree + ripple-carry adder, combinational
//   booth  radix-4 modified Booth with X/Y input buffers, compressor and
//          modified carry save adder; its product appears one clock after
//          a and b (the buffers are the only registers in the suite)
//   comp16 the 16x16 compressor multiplier, on its own operands a16, b16,
//          combinational
// a (a16) is the multiplicand, b (b16) the multiplier.
module mult_suite_top
  import mult_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [OP_W-1:0] a,
  input  logic [OP_W-1:0] b,
  output logic [PR_W-1:0] rcw_product,
  output logic [PR_W-2:0] rcw_sum,
  output logic [PR_W-3:0] rcw_carry,
  output logic [PR_W-2:0] rcw_result,
  output logic [PR_W-1:0] dadda_product,
  output logic [PR_W-1:0] comp_product,
  output logic [PR_W-1:0] booth_product,
  input  logic [15:0]     a16,
  input  logic [15:0]     b16,
  output logic [31:0]     comp16_product
);
  rcw_mult   u_rcw   (.a(a), .b(b), .product(rcw_product), .sum(rcw_sum),
                      .carry(rcw_carry), .result(rcw_result));
  dadda_mult u_dadda (.a(a), .b(b), .product(dadda_product));
  comp_mult  u_comp  (.a(a), .b(b), .product(comp_product));
  booth_mult u_booth (.clk(clk), .rst_n(rst_n), .x(a), .y(b), .product(booth_product));
  comp16_mult u_comp16 (.a(a16), .b(b16), .product(comp16_product));
endmodule
