// Checks that over 2^16 clocks the modulator emits exactly x + 2^15 ones
// (+/-1) for a set of constant inputs, including both ends of the range.
module sigma_delta_dac_tb;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] x = '0;
  logic bit_o;
  int checks = 0, failures = 0;

  sigma_delta_dac dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    int vals[8] = '{0, 1, -1, 12345, -20000, 32767, -32768, 100};
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (vals[v]) begin
      int ones, expect_ones;
      x = 16'(vals[v]);
      repeat (2) @(negedge clk);
      ones = 0;
      repeat (65536) begin
        @(negedge clk);
        ones += int'(bit_o);
      end
      expect_ones = vals[v] + 32768;
      check(ones >= expect_ones - 1 && ones <= expect_ones + 1,
            $sformatf("x=%0d ones=%0d expected %0d", vals[v], ones, expect_ones));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8 * 65540 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
