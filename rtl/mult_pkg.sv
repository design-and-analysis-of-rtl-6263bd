// Shared types and constants of the multiplier suite. OP_W is the operand
// width used throughout (8-bit unsigned operands, 16-bit products).
// booth_ctrl_t is the bundle a modified-Booth encoder hands to a partial
// product generator row: the select lines neg, x1_b, z and x2_b (active-low
// forms as the generator's NAND-OR logic wants them) and the two's
// complement correction bit cor, which is also the sign of the row.
package mult_pkg;
  localparam int OP_W = 8;
  localparam int PR_W = 2 * OP_W;

  typedef struct packed {
    logic neg;    // row is the complement of the multiple of X
    logic x1_b;   // low when the row is +-1 * X
    logic z;      // high when a 2X selection must be suppressed
    logic x2_b;   // low (with z low) when the row is +-2 * X
    logic cor;    // +1 at the row's LSB, and the row's sign
  } booth_ctrl_t;
endpackage
