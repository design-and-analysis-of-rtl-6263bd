// Self-checking testbench of the half-adder multiplexer: all 4-bit a, b and
// both select values, compared with s ? b : a.
module ha_mux_tb;
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
  logic [3:0] a, b, y;
  logic       s;
  ha_mux #(.W(4)) dut (.a(a), .b(b), .s(s), .y(y));

  initial begin
    for (int i = 0; i < 512; i++) begin
      {s, b, a} = 9'(i);
      #1;
      check(y == (s ? b : a), $sformatf("a=%h b=%h s=%0d y=%h", a, b, s, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
