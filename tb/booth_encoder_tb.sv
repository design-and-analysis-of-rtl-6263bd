// Self-checking testbench of the modified-Booth encoder. For each of the
// eight groups it checks the decoded selection (one, two, zero) and the
// correction bit against the encoding truth table, typed in here, and that
// neg is the group's top bit.
module booth_encoder_tb;
  import mult_pkg::*;
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
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [2:0]  y;
  booth_ctrl_t ctl;
  booth_encoder dut (.y(y), .ctl(ctl));

  // truth table rows: {two, zero, cor}, indexed by the group
  localparam logic [2:0] TABLE [8] = '{3'b010, 3'b000, 3'b000, 3'b100,
                                       3'b101, 3'b001, 3'b001, 3'b010};
  initial begin
    for (int g = 0; g < 8; g++) begin
      logic one, two, zero;
      y = 3'(g);
      #1;
      one  = ~ctl.x1_b;
      two  = ~ctl.x2_b & ~ctl.z;
      zero = ~one & ~two;
      check(two  == TABLE[g][2], $sformatf("group %b two", y));
      check(zero == TABLE[g][1], $sformatf("group %b zero", y));
      check(ctl.cor == TABLE[g][0], $sformatf("group %b cor", y));
      check(!(one && two), $sformatf("group %b one and two", y));
      check(ctl.neg == y[2], $sformatf("group %b neg", y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
