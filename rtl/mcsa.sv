// Modified carry save adder (MCSA): sum = a + b + cin for two N-bit words,
// returned on N+2 bits (x0 .. x17 for N = 16; the top bit is always 0 and is
// kept because the adder's last group is four bits wide, x17..x14).
//
// Stage 1 is a row of half adders (a full adder at bit 0, which takes cin)
// that turns a, b into a save vector s and a carry vector c. Stage 2 adds s
// and c shifted up one place. In a conventional carry save adder stage 2 is
// one ripple chain; here it is cut into groups so the ripple only runs
// inside a group:
//   group 0   bits 4..0         ripples from bit 1, gives c4 directly
//   groups 1+ three bits each   (7..5, 10..8, 13..11 for N = 16), each
//                               computed assuming carry-in 0, giving
//                               {c_hi, x_hi..x_lo}
//   last      the rest          (17..14 for N = 16), assuming carry-in 0
// Every group after the first also forms its value plus one with a binary
// to excess-1 converter (bec), and a half-adder multiplexer (ha_mux) picks
// the plain or the incremented value with the true carry out of the group
// below. Only the select chain c4 -> c7 -> c10 -> c13 crosses groups.
// The group sizes for N = 16 are the document's; for other N the middle
// groups stay three bits and the last group takes what is left (3 to 5
// bits), which is this design's own rule. Combinational, no clock.
module mcsa #(
  parameter int N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N+1:0] sum
);
  localparam int G0_W   = 5;                 // bits 4..0
  localparam int MID_W  = 3;                 // bits per middle group
  localparam int N_MID  = (N - 6) / 3;       // number of middle groups
  localparam int LAST_LO = G0_W + MID_W * N_MID;
  localparam int LAST_W  = N + 2 - LAST_LO;  // 4 for N = 16

  if (N < 8) begin : g_bad_n
    $error("mcsa: N must be at least 8");
  end

  // ---------------- stage 1: save vector s, carry vector c ----------------
  logic [N-1:0] s, c;
  full_adder u_fa0 (.a(a[0]), .b(b[0]), .ci(cin), .s(s[0]), .co(c[0]));
  for (genvar i = 1; i < N; i++) begin : g_st1
    half_adder u_ha (.a(a[i]), .b(b[i]), .s(s[i]), .c(c[i]));
  end

  // ---------------- stage 2: grouped ripple of u + v ----------------------
  // u[p] = s[p], v[p] = c[p-1]; x = u + v with the ripple restarted at 0 at
  // the start of every group.
  logic [N:0]   u, v;
  logic [N+1:0] x;        // group-local sums x0..x(N+1)
  logic [N:0]   r;        // r[p] = carry out of position p (group-local)
  assign u = {1'b0, s};
  assign v = {c, 1'b0};

  assign x[0] = u[0];     // bit 0 has nothing to add in stage 2
  assign r[0] = 1'b0;
  for (genvar p = 1; p <= N; p++) begin : g_st2
    localparam bit START = (p == 1) || (p >= G0_W && ((p - G0_W) % MID_W == 0)
                                        && p <= LAST_LO);
    if (START || p == N) begin : g_h
      // first cell of a group (carry-in 0) or the top cell (u[N] = 0)
      half_adder u_h (.a(p == N ? v[p] : u[p]), .b(p == N ? r[p-1] : v[p]),
                      .s(x[p]), .c(r[p]));
    end else begin : g_f
      full_adder u_f (.a(u[p]), .b(v[p]), .ci(r[p-1]), .s(x[p]), .co(r[p]));
    end
  end
  assign x[N+1] = r[N];

  // ---------------- carry-select: BEC + half-adder multiplexers ------------
  logic [N_MID:0] csel;   // csel[0] = c4, csel[g] = true carry out of group g
  assign sum[G0_W-1:0] = x[G0_W-1:0];
  assign csel[0]       = r[G0_W-1];

  for (genvar g = 0; g < N_MID; g++) begin : g_mid
    localparam int LO = G0_W + MID_W * g;
    localparam int HI = LO + MID_W - 1;
    logic [MID_W:0] plain, incr, pick;
    assign plain = {r[HI], x[HI:LO]};
    bec    #(.W(MID_W + 1)) u_bec (.x(plain), .y(incr));
    ha_mux #(.W(MID_W + 1)) u_mux (.a(plain), .b(incr), .s(csel[g]), .y(pick));
    assign sum[HI:LO] = pick[MID_W-1:0];
    assign csel[g+1]  = pick[MID_W];
  end

  logic [LAST_W-1:0] last_plain, last_incr;
  assign last_plain = x[N+1:LAST_LO];
  bec    #(.W(LAST_W)) u_bec_last (.x(last_plain), .y(last_incr));
  ha_mux #(.W(LAST_W)) u_mux_last (.a(last_plain), .b(last_incr), .s(csel[N_MID]),
                                   .y(sum[N+1:LAST_LO]));
endmodule
