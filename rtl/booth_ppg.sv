// Booth partial product generator for one row: from the multiplicand x and
// one encoder's control bundle it forms the W+1 bits of +-X, +-2X or 0 in
// one's complement (the +1 of a negative row comes separately as ctl.cor).
// Each bit j is the NAND of two ORs, as in the decoder drawing:
//   pp[j] = ~( (~(x[j]   ^ neg) | x1_b) &
//              (~(x[j-1] ^ neg) | z | x2_b) )
// with x[-1] = 0 and x[W] = 0, so bit j takes x[j] (1X) or x[j-1] (2X),
// complemented when neg is set. Combinational.
module booth_ppg
  import mult_pkg::*;
#(
  parameter int W = 8
) (
  input  logic [W-1:0] x,
  input  booth_ctrl_t  ctl,
  output logic [W:0]   pp
);
  logic [W+1:0] xe;            // xe[j+1] = x[j], zero at both ends
  assign xe = {1'b0, x, 1'b0};

  for (genvar j = 0; j <= W; j++) begin : g_bit
    logic one_term_n, two_term_n;
    assign one_term_n = ~(xe[j+1] ^ ctl.neg) | ctl.x1_b;
    assign two_term_n = ~(xe[j]   ^ ctl.neg) | ctl.z | ctl.x2_b;
    assign pp[j]      = ~(one_term_n & two_term_n);
  end
endmodule
