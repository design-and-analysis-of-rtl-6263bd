// Self-checking testbench of the Booth multiplier. All 65,536 operand pairs
// are applied, one per clock; the product is checked one clock later
// (latency of the input buffers), and a check that the product has not yet
// changed right after new inputs confirms the one-cycle latency. Reset is
// checked to clear the buffers (product 0).
module booth_mult_tb;
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
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic       rst_n;
  logic [7:0] x, y;
  logic [15:0] product;
  booth_mult dut (.clk(clk), .rst_n(rst_n), .x(x), .y(y), .product(product));

  initial begin
    rst_n = 1'b0; x = 8'd200; y = 8'd100;
    repeat (2) @(posedge clk);
    #1 check(product == 16'd0, "product not 0 in reset");
    rst_n = 1'b1;
    @(negedge clk);
    for (int v = 0; v < 65536; v++) begin
      logic [15:0] prev;
      prev = product;
      x = 8'(v); y = 8'(v >> 8);
      #1;
      if (v > 0) check(product == prev, "product changed before the clock edge");
      @(posedge clk); #1;
      check(product == 16'(x) * 16'(y), $sformatf("%0d * %0d = %0d", x, y, product));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
