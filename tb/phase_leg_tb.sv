// Runs one leg model in closed loop with an inductor (2.5 mH, modelled in
// real arithmetic in the testbench) returning to a constant AC-side voltage.
// Phase 1 switches the gates with dead time; phase 2 disables both gates.
// Every step the leg voltage, upper-path flag and DCM flag are compared with
// a real-valued model of drops, limits and saturated PI fed with the same
// quantised current. At the end of phase 2 the current must be zero and the
// leg voltage must equal the AC-side voltage (discontinuous conduction).
module phase_leg_tb;
  import hil_pkg::*;
  localparam real AP = 17.5e3, TI = 812e-9, TS = 100e-9, L = 2.5e-3;
  // input limit U_DC/Ap, rounded to the current LSB as the design stores it
  localparam real ILIM = real'(longint'(600.0 / AP * 2048.0)) / 2048.0;
  localparam real UAC = 420.0;   // AC-side voltage against the negative rail
  logic clk = 0, rst_n = 0, step = 0;
  volt_t u_dc;
  logic pwm_h = 0, pwm_l = 0;
  amp_t i_ac = '0;
  volt_t u_leg, u_leg_n;
  logic upper_path, dcm, sat_hi, sat_lo, i_limited;
  int checks = 0, failures = 0, n_dcm = 0, n_up = 0;

  phase_leg dut (.*);
  always #5 clk = ~clk;

  function automatic real v2r(volt_t v); return real'(v) / 2.0**VF; endfunction
  function automatic real rabs(real x); return x < 0 ? -x : x; endfunction
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    real il, s, dd, sd, ia, ic, u, hi, lo, y, ul;
    bit eup, edcm;
    il = 0; s = 0; dd = 0; sd = 0;
    u_dc = to_volt(600.0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int pos;
      pos = t % 500;
      if (t < 1500) begin
        pwm_h = pos < 350;
        pwm_l = pos >= 360 && pos < 490;
      end else begin
        pwm_h = 0; pwm_l = 0;
      end
      // il flows out of the leg; the leg model takes the current into it
      i_ac = to_amp(-il);
      #1;
      ia = real'(i_ac) / 2.0**IF;
      hi = pwm_l ? -300.0 + sd : 300.0 + dd;
      lo = pwm_h ?  300.0 - sd : -300.0 - dd;
      ic = ia > ILIM ? ILIM : ia < -ILIM ? -ILIM : ia;
      u  = AP * ic + s;
      y  = u >= hi ? hi : u <= lo ? lo : u;
      ul = y + 300.0;
      eup  = pwm_h ? 1 : pwm_l ? 0 : (u >= hi);
      edcm = !pwm_h && !pwm_l && (u < hi) && (u > lo);
      check(rabs(v2r(u_leg_n) - ul) < 0.05, $sformatf("t=%0d u_leg_n %f expected %f", t, v2r(u_leg_n), ul));
      check(rabs(v2r(u_leg) - y) < 0.05, "u_leg midpoint reference");
      if (rabs(u - hi) > 0.05 && rabs(u - lo) > 0.05) begin
        check(upper_path == eup, $sformatf("t=%0d upper_path %0b expected %0b", t, upper_path, eup));
        check(dcm == edcm, $sformatf("t=%0d dcm %0b expected %0b", t, dcm, edcm));
      end
      if (dcm) n_dcm++;
      if (upper_path) n_up++;
      // advance testbench state by one step
      s  = s + TS / TI * (y - s);
      dd = 1.0 + 0.010 * rabs(ia);
      sd = 1.0 + 0.015 * rabs(ia);
      il = il + TS / L * (v2r(u_leg_n) - UAC);
      step = 1;
      @(negedge clk);
      step = 0;
    end
    check(rabs(il) < 0.002, $sformatf("current %f did not settle to zero", il));
    check(rabs(v2r(u_leg_n) - UAC) < 10.0, $sformatf("leg voltage %f does not follow %f", v2r(u_leg_n), UAC));
    check(n_dcm > 100 && n_up > 100, "coverage: DCM and upper-path conduction");
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
