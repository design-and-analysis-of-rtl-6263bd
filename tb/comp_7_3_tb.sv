// Self-checking testbench of the 7-3 compressor: every combination of its
// 7 inputs, compared with their count of ones.
module comp_7_3_tb;
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
  logic [6:0] i;
  logic [2:0] x;
  comp_7_3 dut (.i(i), .x(x));

  initial begin
    for (int v = 0; v < (1 << 7); v++) begin
      i = 7'(v);
      #1;
      check(x == 3'($countones(v)), $sformatf("in=%b x=%0d", i, x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
