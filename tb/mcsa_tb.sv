// Self-checking testbench of the modified carry save adder. The default
// 16-bit adder and 32- and 64-bit versions are checked against a + b + cin
// on corner cases (each carry-select boundary hit with and without an
// incoming carry) and random operands. It also counts, for the 16-bit
// adder, how often the carry into each group boundary (bits 5, 8, 11, 14) was 1, so
// that every group is known to have used its incremented value.
module mcsa_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [15:0] a16, b16;  logic [17:0] s16;  logic cin16;
  logic [31:0] a32, b32;  logic [33:0] s32;  logic cin32;
  logic [63:0] a64, b64;  logic [65:0] s64;  logic cin64;
  mcsa            dut16 (.a(a16), .b(b16), .cin(cin16), .sum(s16));
  mcsa #(.N(32))  dut32 (.a(a32), .b(b32), .cin(cin32), .sum(s32));
  mcsa #(.N(64))  dut64 (.a(a64), .b(b64), .cin(cin64), .sum(s64));

  int sel_seen [4];

  task automatic apply16(input logic [15:0] a, input logic [15:0] b, input logic c);
    a16 = a; b16 = b; cin16 = c;
    #1;
    check(s16 == 18'(a) + 18'(b) + 18'(c),
          $sformatf("N=16 %h + %h + %0d = %h", a, b, c, s16));
    // carry into bit 5 + 3g, the select line of group g + 1
    for (int g = 0; g < 4; g++) begin
      int lo;
      lo = 5 + 3 * g;
      if (((32'(a) & ((1 << lo) - 1)) + (32'(b) & ((1 << lo) - 1)) + 32'(c)) >> lo) sel_seen[g]++;
    end
  endtask

  initial begin
    apply16(16'h0000, 16'h0000, 1'b0);
    apply16(16'hffff, 16'hffff, 1'b1);
    apply16(16'hffff, 16'h0000, 1'b1);
    apply16(16'h001f, 16'h0001, 1'b0);   // carry out of bit 4
    apply16(16'h00ff, 16'h0001, 1'b0);
    apply16(16'h07ff, 16'h0001, 1'b0);
    apply16(16'h3fff, 16'h0001, 1'b0);
    apply16(16'h8000, 16'h8000, 1'b0);
    for (int e = 0; e < 16; e++) begin
      apply16(16'((1 << e) - 1), 16'h0001, 1'b0);
      apply16(16'((1 << e) - 1), 16'h0000, 1'b1);
    end
    for (int n = 0; n < 60000; n++)
      apply16(16'($urandom), 16'($urandom), 1'($urandom));
    for (int n = 0; n < 20000; n++) begin
      a32 = $urandom; b32 = $urandom; cin32 = 1'($urandom);
      a64 = {$urandom, $urandom}; b64 = {$urandom, $urandom}; cin64 = 1'($urandom);
      if (n == 0) begin a32 = '1; b32 = '0; cin32 = 1'b1; a64 = '1; b64 = '1; cin64 = 1'b1; end
      #1;
      check(s32 == 34'(a32) + 34'(b32) + 34'(cin32), $sformatf("N=32 %h + %h", a32, b32));
      check(s64 == 66'(a64) + 66'(b64) + 66'(cin64), $sformatf("N=64 %h + %h", a64, b64));
    end
    for (int g = 0; g < 4; g++) begin
      $display("group select %0d was 1 in %0d additions", g, sel_seen[g]);
      check(sel_seen[g] > 0, $sformatf("select %0d never 1", g));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
