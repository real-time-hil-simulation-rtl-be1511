// Checks the saturated PI controller against a real-valued model of
//   u = Ap*clamp(i,+/-Ilim) + s,  y = clamp(u, lo, hi),  s += Ts/Ti*(y - s)
// with random currents and limits, including tight limits that keep the
// output saturated (the state must follow the clamped output, i.e. no
// wind-up). Also checks the published tuning: equations (8)-(11) evaluated
// for the test circuit must give the default Ap and Ti, and that the input
// limit is U_DC/Ap.
module sat_pi_tb;
  import hil_pkg::*;
  localparam real AP = 17.5e3, TI = 812e-9, TS = 100e-9, ILIM = 600.0 / AP;
  logic clk = 0, rst_n = 0, step = 0;
  amp_t i_ac = '0;
  volt_t hi_lim, lo_lim, y;
  logic sat_hi, sat_lo, i_limited;
  int checks = 0, failures = 0;
  int n_sat = 0, n_lin = 0, n_lim = 0;

  sat_pi dut (.*);
  always #5 clk = ~clk;

  function automatic real v2r(volt_t v); return real'(v) / 2.0**VF; endfunction
  function automatic real rabs(real x); return x < 0 ? -x : x; endfunction
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    real s, ia, ic, u, ey, hi, lo, wc, phi0;
    // Tuning equations for L_disc = 2.5 mH, t_sim_resp = 50 ns, margin pi/3.
    phi0 = 3.14159265358979 / 2 - 3.14159265358979 / 3;
    wc   = 2.0 / 3.0 * phi0 / 50e-9;
    check(rabs(wc - 6.98e6) / 6.98e6 < 0.01, $sformatf("omega_c %f", wc));
    check(rabs(1.0 / (wc * $tan(phi0 / 3)) - TI) / TI < 0.01, "disc_Ti from (10)");
    check(rabs(wc * 2.5e-3 - AP) / AP < 0.01, "disc_Ap from (11)");
    s = 0;
    hi_lim = to_volt(300.0); lo_lim = to_volt(-300.0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      // limits: wide most of the time, sometimes a narrow window
      if (t % 200 == 0) begin
        if ((t / 200) % 3 == 2) begin
          hi_lim = to_volt(real'($urandom_range(0, 40)) - 20.0 + 5.0);
          lo_lim = to_volt(real'($urandom_range(0, 40)) - 20.0 - 5.0);
          if (lo_lim > hi_lim) lo_lim = hi_lim - to_volt(1.0);
        end else begin
          hi_lim = to_volt(301.0); lo_lim = to_volt(-301.0);
        end
      end
      i_ac = amp_t'($urandom_range(0, 200) - 100);   // about +/-49 mA
      #1;
      hi = v2r(hi_lim); lo = v2r(lo_lim);
      ia = real'(i_ac) / 2.0**IF;
      ic = ia > ILIM ? ILIM : ia < -ILIM ? -ILIM : ia;
      u  = AP * ic + s;
      ey = u >= hi ? hi : u <= lo ? lo : u;
      check(rabs(v2r(y) - ey) < 0.05, $sformatf("t=%0d y %f expected %f", t, v2r(y), ey));
      check(i_limited == (rabs(ia) > ILIM + 0.0003), $sformatf("i_limited %0b for %f A", i_limited, ia));
      check(sat_hi == (u >= hi) || rabs(u - hi) < 0.05, "sat_hi flag");
      if (sat_hi || sat_lo) n_sat++; else n_lin++;
      if (i_limited) n_lim++;
      s = s + TS / TI * (ey - s);
      step = 1;
      @(negedge clk);
      step = 0;
    end
    check(n_sat > 100 && n_lin > 100 && n_lim > 100, "coverage of saturation and input limit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
