// Self-checking testbench of the 16x16 compressor multiplier: corner
// operands (0, 1, all ones, single bits, alternating patterns), every
// single-bit times single-bit product, and 200,000 random operand pairs,
// compared with a*b.
module comp16_mult_tb;
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
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] a, b;
  logic [31:0] product;
  comp16_mult dut (.a(a), .b(b), .product(product));

  task automatic apply(input logic [15:0] x, input logic [15:0] y);
    a = x; b = y;
    #1;
    check(product == 32'(x) * 32'(y), $sformatf("%h * %h = %h", x, y, product));
  endtask

  initial begin
    logic [15:0] corner [6] = '{16'h0000, 16'h0001, 16'hffff, 16'h8000, 16'haaaa, 16'h5555};
    foreach (corner[i]) foreach (corner[j]) apply(corner[i], corner[j]);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) apply(16'(1 << i), 16'(1 << j));
    for (int n = 0; n < 200000; n++) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
