// Self-checking testbench of the reduced-complexity Wallace multiplier.
// All 65,536 operand pairs: product = a*b, sum + 2*carry = a*b, result =
// product[15:1]. The two operand pairs of the published simulation are also
// checked against the product and result values printed there.
module rcw_mult_tb;
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
  logic [14:0] sum, result;
  logic [13:0] carry;
  rcw_mult dut (.a(a), .b(b), .product(product), .sum(sum), .carry(carry), .result(result));

  initial begin
    // published vectors: multiplicand, multiplier, product, result
    a = 8'b01110001; b = 8'b00010101; #1;
    check(product == 16'b0000100101000101, "published vector 1 product");
    check(result  == 15'b000010010100010,  "published vector 1 result");
    a = 8'b00110001; b = 8'b00011101; #1;
    check(product == 16'b0000010110001101, "published vector 2 product");
    check(result  == 15'b000001011000110,  "published vector 2 result");
    for (int v = 0; v < 65536; v++) begin
      a = 8'(v); b = 8'(v >> 8);
      #1;
      check(product == 16'(a) * 16'(b), $sformatf("%0d * %0d = %0d", a, b, product));
      check(16'(sum) + 16'({carry, 1'b0}) == 16'(a) * 16'(b),
            $sformatf("%0d * %0d: sum/carry rows", a, b));
      check(result == product[15:1], $sformatf("%0d * %0d: result", a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
