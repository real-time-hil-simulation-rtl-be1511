// Checks the R-L branch integrator against a real-valued forward-Euler model
// of L di/dt = u_a - u_b - R_s*i with random terminal voltages, that the
// state moves only on a step strobe, and saturation at the current range.
module inductor_branch_tb;
  import hil_pkg::*;
  localparam real L = 2.5e-3, RS = 0.05, TS = 100e-9;
  logic clk = 0, rst_n = 0, step = 0;
  volt_t u_a, u_b;
  amp_t i;
  int checks = 0, failures = 0;

  inductor_branch dut (.*);
  always #5 clk = ~clk;

  function automatic real rabs(real x); return x < 0 ? -x : x; endfunction
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    real ir, va, vb;
    amp_t held;
    ir = 0;
    u_a = '0; u_b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(i == 0, "reset");
    for (int t = 0; t < 4000; t++) begin
      if (t % 50 == 0) begin
        va = real'($urandom_range(0, 600000)) / 1000.0;
        vb = 300.0 + real'($urandom_range(0, 200000)) / 1000.0;
        u_a = to_volt(va); u_b = to_volt(vb);
        va = real'(u_a) / 2.0**VF; vb = real'(u_b) / 2.0**VF;
      end
      if (t % 97 == 0) begin
        held = i;
        @(negedge clk);
        check(i == held, "state changed without step");
      end
      ir = ir + TS / L * (va - vb - RS * ir);
      step = 1;
      @(negedge clk);
      step = 0;
      check(rabs(real'(i) / 2.0**IF - ir) < 0.001, $sformatf("t=%0d i %f expected %f", t, real'(i) / 2.0**IF, ir));
    end
    // drive hard positive until the range limit
    u_a = to_volt(1000.0); u_b = to_volt(-1000.0);
    step = 1;
    repeat (20000) @(negedge clk);
    step = 0;
    check(i == AMP_MAX, $sformatf("saturation at %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
