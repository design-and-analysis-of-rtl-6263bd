// End-to-end testbench of the multiplier suite at its default sizes. All
// 65,536 operand pairs are applied, one per clock. The three combinational
// multipliers are checked in the same cycle, the Booth multiplier one clock
// later (its input buffers), all against a*b; the Wallace multiplier's
// sum/carry/result vectors are checked too. The 16x16 compressor multiplier
// gets a fresh random operand pair every cycle.
// It also counts, from the operands, how often each mechanism of the design
// was exercised and fails if one never was:
//   - each Booth digit -2, -1, -0 (group 111), 0, +1, +2;
//   - each carry-select group of the Wallace multiplier's final adder taking
//     its incremented value (carry into bit 5, 8, 11 or 14 of sum + carry).
module mult_suite_top_tb;
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
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        rst_n;
  logic [7:0]  a, b;
  logic [15:0] rcw_product, dadda_product, comp_product, booth_product;
  logic [14:0] rcw_sum, rcw_result;
  logic [13:0] rcw_carry;
  logic [15:0] a16, b16;
  logic [31:0] comp16_product;

  mult_suite_top dut (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b),
    .rcw_product(rcw_product), .rcw_sum(rcw_sum), .rcw_carry(rcw_carry),
    .rcw_result(rcw_result), .dadda_product(dadda_product),
    .comp_product(comp_product), .booth_product(booth_product),
    .a16(a16), .b16(b16), .comp16_product(comp16_product)
  );

  int digit_seen [6];   // -2, -1, -0, 0, +1, +2
  int sel_seen   [4];
  string digit_name [6] = '{"-2", "-1", "-0", "0", "+1", "+2"};

  task automatic count_mechanisms();
    logic [10:0] ye;
    logic [15:0] sa, sb;
    ye = {2'b00, b, 1'b0};
    for (int i = 0; i < 5; i++) begin
      case (ye[2*i +: 3])
        3'b100:                 digit_seen[0]++;
        3'b101, 3'b110:         digit_seen[1]++;
        3'b111:                 digit_seen[2]++;
        3'b000:                 digit_seen[3]++;
        3'b001, 3'b010:         digit_seen[4]++;
        default:                digit_seen[5]++;
      endcase
    end
    sa = 16'(rcw_sum[14:1]);
    sb = 16'(rcw_carry);
    for (int g = 0; g < 4; g++) begin
      int lo;
      lo = 5 + 3 * g;
      if (((32'(sa) & ((1 << lo) - 1)) + (32'(sb) & ((1 << lo) - 1))) >> lo) sel_seen[g]++;
    end
  endtask

  initial begin
    logic [15:0] expected, expected_prev;
    rst_n = 1'b0; a = '0; b = '0; a16 = '0; b16 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    expected_prev = '0;
    @(negedge clk);
    for (int v = 0; v < 65536; v++) begin
      a = 8'(v * 37 + (v >> 8));     // every pair once, in a scrambled order
      b = 8'(v >> 8);
      expected = 16'(a) * 16'(b);
      a16 = 16'($urandom);
      b16 = (v < 16) ? 16'hffff : 16'($urandom);
      #1;
      check(comp16_product == 32'(a16) * 32'(b16), $sformatf("comp16 %0d*%0d", a16, b16));
      check(rcw_product   == expected, $sformatf("rcw %0d*%0d=%0d", a, b, rcw_product));
      check(dadda_product == expected, $sformatf("dadda %0d*%0d=%0d", a, b, dadda_product));
      check(comp_product  == expected, $sformatf("comp %0d*%0d=%0d", a, b, comp_product));
      check(16'(rcw_sum) + 16'({rcw_carry, 1'b0}) == expected, "rcw sum/carry");
      check(rcw_result == expected[15:1], "rcw result");
      if (v > 0) check(booth_product == expected_prev, "booth before edge");
      count_mechanisms();
      @(posedge clk); #1;
      check(booth_product == expected, $sformatf("booth %0d*%0d=%0d", a, b, booth_product));
      expected_prev = expected;
      @(negedge clk);
    end
    for (int d = 0; d < 6; d++) begin
      $display("Booth digit %s: %0d groups", digit_name[d], digit_seen[d]);
      check(digit_seen[d] > 0, {"Booth digit never seen: ", digit_name[d]});
    end
    for (int g = 0; g < 4; g++) begin
      $display("MCSA group %0d took its incremented value %0d times", g + 1, sel_seen[g]);
      check(sel_seen[g] > 0, "MCSA group never incremented");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
