// Checks the device drop characteristic drop = U0 + r*|i| for random leg
// currents of both signs, that the outputs change only on a step strobe, and
// the one-step latency.
module voltage_drops_tb;
  import hil_pkg::*;
  logic clk = 0, rst_n = 0, step = 0;
  amp_t i_ac = '0;
  volt_t d_h_drop, d_l_drop, sw_h_drop, sw_l_drop;
  int checks = 0, failures = 0;

  voltage_drops dut (.*);
  always #5 clk = ~clk;

  function automatic real v2r(volt_t v); return real'(v) / 2.0**VF; endfunction
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    real ia, ed, es;
    volt_t held;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(d_h_drop == 0 && sw_l_drop == 0, "reset value");
    for (int t = 0; t < 400; t++) begin
      i_ac = amp_t'($urandom_range(0, 2 * 40960) - 40960);  // +/-20 A
      if (t % 7 == 0) i_ac = '0;
      ia = real'(i_ac) / 2.0**IF;
      if (ia < 0) ia = -ia;
      held = d_h_drop;
      @(negedge clk);                 // no step: outputs hold
      check(d_h_drop == held, "output changed without step");
      step = 1;
      @(negedge clk);
      step = 0;
      ed = 1.0 + 0.010 * ia;
      es = 1.0 + 0.015 * ia;
      check(v2r(d_h_drop) - ed < 1e-4 && ed - v2r(d_h_drop) < 1e-4,
            $sformatf("diode drop %f expected %f", v2r(d_h_drop), ed));
      check(d_l_drop == d_h_drop, "lower diode drop");
      check(v2r(sw_h_drop) - es < 1e-4 && es - v2r(sw_h_drop) < 1e-4,
            $sformatf("switch drop %f expected %f", v2r(sw_h_drop), es));
      check(sw_l_drop == sw_h_drop, "lower switch drop");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
