// Self-checking testbench of the binary to excess-1 converter: every 4-bit
// and every 5-bit input, compared with x + 1 modulo 2^W.
module bec_tb;
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [3:0] x4, y4;
  logic [4:0] x5, y5;
  bec #(.W(4)) dut4 (.x(x4), .y(y4));
  bec #(.W(5)) dut5 (.x(x5), .y(y5));

  initial begin
    for (int i = 0; i < 32; i++) begin
      x4 = 4'(i);
      x5 = 5'(i);
      #1;
      if (i < 16) check(y4 == 4'(i + 1), $sformatf("W=4 x=%h y=%h", x4, y4));
      check(y5 == 5'(i + 1), $sformatf("W=5 x=%h y=%h", x5, y5));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
