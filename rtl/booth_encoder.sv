// Modified (radix-4) Booth encoder for one group of three multiplier bits
// y = {y(2i+1), y(2i), y(2i-1)}, which stands for the digit
// -2*y(2i+1) + y(2i) + y(2i-1) in {-2, -1, 0, +1, +2}.
// Outputs, as drawn for the encoder logic:
//   neg  = y(2i+1)
//   x1_b = ~(y(2i) ^ y(2i-1))      low for a +-1 digit
//   z    = ~(y(2i+1) ^ y(2i-1))
//   x2_b =   y(2i) ^ y(2i-1)
// A +-2 digit is selected where x2_b and z are both low. cor follows the
// truth table's correction column: 1 for -2X and -X (groups 100, 101, 110),
// 0 for the -0 group 111, whose row is all zeros. Combinational.
module booth_encoder
  import mult_pkg::*;
(
  input  logic [2:0]  y,     // y[2] = y(2i+1), y[1] = y(2i), y[0] = y(2i-1)
  output booth_ctrl_t ctl
);
  always_comb begin
    ctl.neg  = y[2];
    ctl.x1_b = ~(y[1] ^ y[0]);
    ctl.z    = ~(y[2] ^ y[0]);
    ctl.x2_b =   y[1] ^ y[0];
    ctl.cor  = y[2] & ~(y[1] & y[0]);
  end
endmodule
