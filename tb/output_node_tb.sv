// Checks the output node (C, R_C, battery behind an ideal diode) against a
// real-valued forward-Euler model with random input currents and battery
// voltages, so that the diode both conducts and blocks; checks the battery
// current, the diode flag and the reset operating point of 450 V.
module output_node_tb;
  import hil_pkg::*;
  localparam real C = 1.1e-3, RC = 4.7e3, RB = 0.2, TS = 100e-9;
  logic clk = 0, rst_n = 0, step = 0;
  logic signed [IW+1:0] i_in = '0;
  volt_t u_batt, u_out;
  amp_t i_batt;
  logic d_on;
  int checks = 0, failures = 0, n_on = 0, n_off = 0;

  output_node dut (.*);
  always #5 clk = ~clk;

  function automatic real v2r(volt_t v); return real'(v) / 2.0**VF; endfunction
  function automatic real rabs(real x); return x < 0 ? -x : x; endfunction
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    real uo, ub, ii, ib;
    u_batt = to_volt(450.0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    uo = 450.0;
    check(rabs(v2r(u_out) - 450.0) < 1e-6, "reset operating point");
    for (int t = 0; t < 6000; t++) begin
      if (t % 300 == 0) begin
        u_batt = to_volt(449.8 + real'($urandom_range(0, 400)) / 1000.0);
        i_in   = (IW+2)'(signed'($urandom_range(0, 40000)) - 20000);  // +/-9.8 A
      end
      #1;
      ub = v2r(u_batt);
      ii = real'(i_in) / 2.0**IF;
      ib = uo > ub ? (uo - ub) / RB : 0.0;
      check(rabs(v2r(u_out) - uo) < 1e-3, $sformatf("t=%0d u_out %f expected %f", t, v2r(u_out), uo));
      check(rabs(real'(i_batt) / 2.0**IF - ib) < 0.01, $sformatf("t=%0d i_batt %f expected %f", t, real'(i_batt) / 2.0**IF, ib));
      if (rabs(uo - ub) > 1e-3) check(d_on == (uo > ub), "diode flag");
      if (d_on) n_on++; else n_off++;
      uo = uo + TS / C * (ii - uo / RC - ib);
      step = 1;
      @(negedge clk);
      step = 0;
    end
    check(n_on > 100 && n_off > 100, "diode both conducted and blocked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
