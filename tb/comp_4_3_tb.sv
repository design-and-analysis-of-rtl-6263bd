// Self-checking testbench of the 4-3 compressor: all 32 combinations of the
// four inputs and carry-in, compared with their count of ones.
module comp_4_3_tb;
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
  logic [3:0] x;
  logic       cin;
  logic [2:0] s;
  comp_4_3 dut (.x(x), .cin(cin), .s(s));

  initial begin
    for (int v = 0; v < 32; v++) begin
      {cin, x} = 5'(v);
      #1;
      check(s == 3'($countones(v)), $sformatf("in=%b s=%0d", 5'(v), s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
