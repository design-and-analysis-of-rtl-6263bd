// Radix-4 modified-Booth multiplier, 8-bit unsigned operands, 16-bit
// product: product = x * y.
//
// Dataflow (one row per box of the block diagram):
//   1. X and Y input buffers: registers that capture x and y on every rising
//      clock edge (reset to 0).
//   2. Booth encoders: the buffered multiplier y is cut into five
//      overlapping 3-bit groups {y(2i+1), y(2i), y(2i-1)}, i = 0..4, with
//      y(-1) = 0 and y(8) = y(9) = 0 so the unsigned operand is read as a
//      positive number. Each group gives a digit in {-2..+2}.
//   3. Partial product generators: five 9-bit rows (one's complement of
//      +-X, +-2X or 0), each sign-extended with its cor bit to 16 bits and
//      weighted by 4^i, plus one row holding the cor bits (the +1 of each
//      negative row) at bit 2i.
//   4. Compressor: the six rows go through a tree of word-level 3:2
//      carry-save adders (6 -> 4 -> 3 -> 2).
//   5. Modified carry save adder: adds the last two rows.
// The block structure, encoder/decoder logic and the MCSA final adder follow
// the document; the full sign extension, the separate correction row and
// the carry-save tree shape are this design's own choices.
// Timing: product is combinational from the input buffers, so it is valid
// one clock after x and y are presented (latency 1).
module booth_mult
  import mult_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [OP_W-1:0] x,        // multiplicand
  input  logic [OP_W-1:0] y,        // multiplier (Booth recoded)
  output logic [PR_W-1:0] product
);
  localparam int NG = OP_W / 2 + 1;   // 5 groups for an unsigned operand

  // ---------------- input buffers ----------------
  logic [OP_W-1:0] xb, yb;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xb <= '0;
      yb <= '0;
    end else begin
      xb <= x;
      yb <= y;
    end
  end

  // ---------------- encoders and partial product rows ----------------
  logic [2*NG:0]   ye;                // ye[k+1] = y[k], ye[0] = y(-1) = 0
  booth_ctrl_t     ctl  [NG];
  logic [OP_W:0]   pp   [NG];
  logic [PR_W-1:0] rows [NG+1];
  assign ye = {{(2*NG - OP_W){1'b0}}, yb, 1'b0};

  for (genvar i = 0; i < NG; i++) begin : g_row
    booth_encoder u_enc (.y(ye[2*i+2:2*i]), .ctl(ctl[i]));
    booth_ppg #(.W(OP_W)) u_ppg (.x(xb), .ctl(ctl[i]), .pp(pp[i]));
    assign rows[i] = {{(PR_W-OP_W-1){ctl[i].cor}}, pp[i]} << (2*i);
  end

  always_comb begin
    rows[NG] = '0;
    for (int i = 0; i < NG; i++) rows[NG][2*i] = ctl[i].cor;
  end

  // ---------------- carry-save compression 6 -> 2 ----------------
  logic [PR_W-1:0] s1, c1, s2, c2, s3, c3, s4, c4;
  csa3 #(.W(PR_W)) u_csa1 (.a(rows[0]), .b(rows[1]), .c(rows[2]), .s(s1), .cy(c1));
  csa3 #(.W(PR_W)) u_csa2 (.a(rows[3]), .b(rows[4]), .c(rows[5]), .s(s2), .cy(c2));
  csa3 #(.W(PR_W)) u_csa3 (.a(s1),      .b(c1),      .c(s2),      .s(s3), .cy(c3));
  csa3 #(.W(PR_W)) u_csa4 (.a(s3),      .b(c3),      .c(c2),      .s(s4), .cy(c4));

  // ---------------- final adder ----------------
  logic [PR_W+1:0] total;
  mcsa #(.N(PR_W)) u_mcsa (.a(s4), .b(c4), .cin(1'b0), .sum(total));
  assign product = total[PR_W-1:0];   // modulo 2^16: the rows' sign bits cancel
endmodule
