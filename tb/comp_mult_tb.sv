// Self-checking testbench of the compressor multiplier: all 65,536 operand pairs,
// compared with a*b.
module comp_mult_tb;
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
  logic [7:0]  a, b;
  logic [15:0] product;
  comp_mult dut (.a(a), .b(b), .product(product));

  initial begin
    for (int v = 0; v < 65536; v++) begin
      a = 8'(v); b = 8'(v >> 8);
      #1;
      check(product == 16'(a) * 16'(b), $sformatf("%0d * %0d = %0d", a, b, product));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
