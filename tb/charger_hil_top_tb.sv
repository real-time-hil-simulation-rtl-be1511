// End-to-end test of the charger model at its default parameters.
//
// A gate-signal generator plays the controller under test: three-phase
// interleaved PWM at 10 kHz (1000 model steps per period) with duty 0.75 and
// 2 us dead time, for two periods; then all six gates are disabled; then the
// DC bus is lowered below the output voltage so that the disabled bridge
// rectifies. A real-valued forward-Euler model of the same circuit, written
// from the circuit equations, runs alongside and every model step the
// design's phase currents, leg voltages and output voltage are compared with
// it. After the disable the currents must settle to zero, the leg voltages
// must follow the output voltage and the DC-link current must vanish. The
// test counts how often each mechanism occurred (upper/lower switch
// conduction, dead-time diode conduction, discontinuous mode, input-limit
// clipping, battery diode on and off, rectification) and fails any that
// never did. It also checks the 100 ns step period (10 clocks).
module charger_hil_top_tb;
  import hil_pkg::*;

  localparam int NLEG = 3;
  localparam int PER  = 1000, HON = 750, DT = 20;
  localparam int N_RUN = 2 * PER, N_OFF = 1000, N_RECT = 1000;
  localparam real TS = 100e-9, L = 2.5e-3, RS = 0.05, C = 1.1e-3, RC = 4.7e3;
  localparam real RB = 0.2, AP = 17.5e3, TI = 812e-9, UDCN = 600.0;
  localparam real ILIM = UDCN / AP;
  localparam real DU0 = 1.0, DR = 0.010, SU0 = 1.0, SR = 0.015;

  logic clk = 0, rst_n = 0;
  volt_t u_dc, u_batt;
  logic [NLEG-1:0] pwm_h = '0, pwm_l = '0;
  logic step_o;
  volt_t u_leg [NLEG];
  amp_t  i_ph [NLEG];
  volt_t u_out;
  amp_t  i_batt;
  logic signed [IW+1:0] i_dc;
  logic [NLEG-1:0] dcm, sat_hi, sat_lo, i_limited;
  logic batt_diode_on;
  logic [2*NLEG:0] dac_bits;

  charger_hil_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic real v2r(volt_t v); return real'(v) / 2.0**VF; endfunction
  function automatic real a2r(amp_t a);  return real'(a) / 2.0**IF; endfunction
  function automatic real rabs(real x);  return x < 0 ? -x : x; endfunction
  function automatic real clampr(real x, real lo, real hi);
    if (x >= hi) return hi;
    if (x <= lo) return lo;
    return x;
  endfunction

  // Reference model state.
  real il[NLEG], s[NLEG], dd[NLEG], sd[NLEG], uo, udc_r, ub_r;
  real max_ie = 0, max_ve = 0, max_uoe = 0;

  int n = 0;
  bit pending = 0;
  int phase = 0;   // 0 PWM, 1 disabled, 2 rectifying
  int c_h = 0, c_l = 0, c_dead = 0, c_dcm = 0, c_lim = 0, c_bon = 0, c_boff = 0, c_rect = 0;

  task automatic set_gates();
    for (int k = 0; k < NLEG; k++) begin
      int pos;
      pos = (n + k * PER / 3) % PER;
      pwm_h[k] = (phase == 0) && (pos < HON);
      pwm_l[k] = (phase == 0) && (pos >= HON + DT) && (pos < PER - DT);
    end
  endtask

  task automatic ref_step_and_compare();
    real y[NLEG], ul[NLEG], isum, ib, hi, lo, ic, u;
    isum = 0;
    for (int k = 0; k < NLEG; k++) begin
      real iin;
      iin = -il[k];
      hi = pwm_l[k] ? -udc_r / 2 + sd[k] : udc_r / 2 + dd[k];
      lo = pwm_h[k] ?  udc_r / 2 - sd[k] : -udc_r / 2 - dd[k];
      ic = clampr(iin, -ILIM, ILIM);
      u  = AP * ic + s[k];
      y[k]  = (u >= hi) ? hi : (u <= lo) ? lo : u;
      ul[k] = y[k] + udc_r / 2;
      isum += il[k];
    end
    // compare the design against the reference before advancing
    for (int k = 0; k < NLEG; k++) begin
      real ie, ve;
      ie = rabs(a2r(i_ph[k]) - il[k]);
      ve = rabs(v2r(u_leg[k]) - ul[k]);
      if (ie > max_ie) max_ie = ie;
      if (ve > max_ve) max_ve = ve;
      check(ie < 0.02, $sformatf("step %0d leg %0d current %f vs %f", n, k, a2r(i_ph[k]), il[k]));
      check(ve < 25.0, $sformatf("step %0d leg %0d voltage %f vs %f", n, k, v2r(u_leg[k]), ul[k]));
    end
    if (rabs(v2r(u_out) - uo) > max_uoe) max_uoe = rabs(v2r(u_out) - uo);
    check(rabs(v2r(u_out) - uo) < 0.5, $sformatf("step %0d u_out %f vs %f", n, v2r(u_out), uo));
    // advance the reference by one forward-Euler step
    ib = (uo > ub_r) ? (uo - ub_r) / RB : 0.0;
    for (int k = 0; k < NLEG; k++) begin
      real iin;
      iin = -il[k];
      il[k] = il[k] + TS / L * (ul[k] - uo - RS * il[k]);
      s[k]  = s[k] + TS / TI * (y[k] - s[k]);
      dd[k] = DU0 + DR * rabs(iin);
      sd[k] = SU0 + SR * rabs(iin);
    end
    uo = uo + TS / C * (isum - uo / RC - ib);
  endtask

  task automatic count_mechanisms();
    for (int k = 0; k < NLEG; k++) begin
      if (pwm_h[k]) c_h++;
      if (pwm_l[k]) c_l++;
      if (phase == 0 && !pwm_h[k] && !pwm_l[k] && (sat_hi[k] || sat_lo[k])) c_dead++;
      if (dcm[k]) c_dcm++;
      if (i_limited[k]) c_lim++;
      if (v2r(u_leg[k]) > v2r(u_dc)) c_rect++;
    end
    if (batt_diode_on) c_bon++; else c_boff++;
  endtask

  // Step period: step_o must be high exactly one clock in ten.
  int last_step_cyc = -1, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (step_o) begin
      if (last_step_cyc >= 0) check(cyc - last_step_cyc == 10, "step period");
      last_step_cyc = cyc;
    end
  end

  always @(negedge clk) if (rst_n) begin
    if (step_o) begin
      count_mechanisms();
      ref_step_and_compare();
      n++;
      pending = 1;
    end else if (pending) begin
      pending = 0;
      if (n == N_RUN) phase = 1;
      if (n == N_RUN + N_OFF) begin
        phase = 2;
        u_dc  = to_volt(400.0);
        udc_r = 400.0;
      end
      set_gates();
    end
  end

  // End-of-phase checks on the settled state.
  task automatic settled_checks(input string tag, input bit rect);
    real isum_abs;
    for (int k = 0; k < NLEG; k++) begin
      if (!rect) begin
        check(rabs(a2r(i_ph[k])) < 0.005, $sformatf("%s leg %0d current %f not zero", tag, k, a2r(i_ph[k])));
        check(rabs(v2r(u_leg[k]) - v2r(u_out)) < 15.0,
              $sformatf("%s leg %0d voltage %f does not follow u_out %f", tag, k, v2r(u_leg[k]), v2r(u_out)));
      end else begin
        check(a2r(i_ph[k]) < -0.1, $sformatf("%s leg %0d does not rectify (%f A)", tag, k, a2r(i_ph[k])));
        check(sat_hi[k], $sformatf("%s leg %0d not on the upper diode", tag, k));
      end
    end
    if (!rect) check(rabs(real'(i_dc) / 2.0**IF) < 0.015, $sformatf("%s i_dc %f not zero", tag, real'(i_dc) / 2.0**IF));
    else       check(i_dc < 0, $sformatf("%s i_dc %0d not negative", tag, i_dc));
  endtask

  initial begin
    u_dc = to_volt(600.0); u_batt = to_volt(450.0);
    udc_r = 600.0; ub_r = 450.0; uo = 450.0;
    for (int k = 0; k < NLEG; k++) begin il[k] = 0; s[k] = 0; dd[k] = 0; sd[k] = 0; end
    set_gates();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (n == N_RUN + N_OFF - 1);
    @(negedge clk);
    settled_checks("disabled", 0);
    wait (n == N_RUN + N_OFF + N_RECT - 1);
    @(negedge clk);
    settled_checks("rectifying", 1);
    $display("max deviation from reference: current %f A, leg voltage %f V, u_out %f V", max_ie, max_ve, max_uoe);
    $display("mechanisms: upper_on=%0d lower_on=%0d deadtime_diode=%0d dcm=%0d input_limit=%0d batt_diode_on=%0d batt_diode_off=%0d rectify=%0d",
             c_h, c_l, c_dead, c_dcm, c_lim, c_bon, c_boff, c_rect);
    check(c_h > 0, "upper switch never on");
    check(c_l > 0, "lower switch never on");
    check(c_dead > 0, "no dead-time diode conduction");
    check(c_dcm > 0, "no discontinuous conduction");
    check(c_lim > 0, "input limit never active");
    check(c_bon > 0, "battery diode never conducting");
    check(c_boff > 0, "battery diode never blocking");
    check(c_rect > 0, "no rectification");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * (N_RUN + N_OFF + N_RECT) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
