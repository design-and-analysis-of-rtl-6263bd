// Self-checking testbench of the Booth partial product row generator,
// driven by the real encoder. For every 8-bit multiplicand and every
// 3-bit group the 9-bit row must be the Booth multiple d*X (d in -2..+2
// from the group) in one's complement form: the row bits equal d*X when
// d >= 0 and ~(|d|*X) when d < 0.
module booth_ppg_tb;
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
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [7:0]  x;
  logic [2:0]  y;
  booth_ctrl_t ctl;
  logic [8:0]  pp;
  booth_encoder u_enc (.y(y), .ctl(ctl));
  booth_ppg     dut   (.x(x), .ctl(ctl), .pp(pp));

  initial begin
    for (int g = 0; g < 8; g++) begin
      for (int xv = 0; xv < 256; xv++) begin
        int d, mag;
        logic [8:0] exp_pp;
        y = 3'(g);
        x = 8'(xv);
        d = -2 * int'(y[2]) + int'(y[1]) + int'(y[0]);
        mag = (d < 0 ? -d : d) * xv;
        exp_pp = (d < 0) ? ~9'(mag) : 9'(mag);
        #1;
        check(pp == exp_pp, $sformatf("group %b x=%0d pp=%b exp=%b", y, xv, pp, exp_pp));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
