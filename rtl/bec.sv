// Binary to excess-1 converter (BEC): y = x + 1 modulo 2^W, without a carry
// chain adder. Bit 0 is inverted; bit k is flipped when all bits below it
// are 1 (x[k] ^ &x[k-1:0]). In the modified carry save adder it precomputes
// the "carry-in = 1" result of a group. The 4-bit width is the one used in
// the adder; W is a parameter so the last group can be wider or narrower.
// Combinational.
module bec #(
  parameter int W = 4
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);
  logic [W-1:0] all_ones_below;   // all_ones_below[k] = &x[k-1:0]

  assign all_ones_below[0] = 1'b1;
  for (genvar k = 1; k < W; k++) begin : g_and
    assign all_ones_below[k] = all_ones_below[k-1] & x[k-1];
  end
  assign y = x ^ all_ones_below;
endmodule
