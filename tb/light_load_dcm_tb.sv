// Light-load PWM in discontinuous conduction on the full charger model at
// default parameters.
//
// The battery voltage is set above the output voltage so its diode blocks
// and only R_C loads the output. Only the upper switches are gated (5 us
// pulses, 10 kHz, interleaved), so each leg works as a non-synchronous buck:
// the current rises during the pulse, falls through the lower diode to
// zero, and the leg then stays discontinuous until the next pulse. For
// every pulse the testbench predicts from the inductor equation the peak
// current  Ipk = (U_DC - u_out) * t_on / L  and the fall time
// t_f = L * Ipk / (u_out + drop)  and checks the peak, the step at which the
// DCM flag rises, and, late in each DCM interval, that the current is
// (nearly) zero, from the second period on, and the leg voltage equals the output voltage instead of
// chattering between the rails.
//
// In periods 5..9 the lower switch is also gated, for 1 us after a 3 us
// dead time. The current reaches zero inside the dead time, so the leg must
// enter DCM there, before the lower switch turns on. The lower pulse then
// drives the current negative; after it the upper diode conducts until the
// current is zero again, and the second DCM entry is checked against
// t = L*|i| / (U_DC + drop - u_out).
module light_load_dcm_tb;
  import hil_pkg::*;

  localparam int NLEG = 3, PER = 1000, TON = 50, NPER = 10;
  // second half: synchronous gating, dead time DT, lower switch on for TLOW
  localparam int DT = 30, TLOW = 10, LOW_OFF = TON + DT + TLOW;
  localparam real L = 2.5e-3, TS = 100e-9, RS = 0.05;

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

  int checks = 0, failures = 0, n_pulses = 0, n_dcm_checks = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask
  function automatic real v2r(volt_t v); return real'(v) / 2.0**VF; endfunction
  function automatic real a2r(amp_t a);  return real'(a) / 2.0**IF; endfunction
  function automatic real rabs(real x);  return x < 0 ? -x : x; endfunction

  int n = 0;
  real ipk_pred[NLEG], tf_pred[NLEG], ipk[NLEG];
  int  t_dcm[NLEG], t_dcm2[NLEG], n_dt_dcm = 0;
  real t2_pred[NLEG];
  bit  sync_mode[NLEG];
  real last_ipk, last_ipk_pred, last_tf_pred;
  int  last_tf;

  always @(negedge clk) if (rst_n && step_o) begin
    for (int k = 0; k < NLEG; k++) begin
      int pos;
      pos = (n + k * PER / 3) % PER;
      if (pos == 0) begin
        ipk_pred[k] = (600.0 - 1.0 - v2r(u_out)) * TON * TS / L;
        tf_pred[k]  = L * ipk_pred[k] / (v2r(u_out) + 1.0 + 0.01 * ipk_pred[k]) / TS;
        ipk[k] = 0;
        t_dcm[k] = -1;
      end
      if (pos < TON + 5 && a2r(i_ph[k]) > ipk[k]) ipk[k] = a2r(i_ph[k]);
      if (pos > TON && t_dcm[k] < 0 && dcm[k]) t_dcm[k] = pos - TON;
      if (sync_mode[k] && pos == LOW_OFF) begin
        t2_pred[k] = L * rabs(a2r(i_ph[k])) / (600.0 + 1.0 - v2r(u_out)) / TS;
        t_dcm2[k] = -1;
      end
      if (sync_mode[k] && pos > LOW_OFF && t_dcm2[k] < 0 && dcm[k]) t_dcm2[k] = pos - LOW_OFF;
      if (n >= PER && pos == PER - 1) begin
        n_pulses++;
        if (k == 0) begin
          last_ipk = ipk[k]; last_ipk_pred = ipk_pred[k];
          last_tf = t_dcm[k]; last_tf_pred = tf_pred[k];
        end
        check(rabs(ipk[k] - ipk_pred[k]) < 0.02 * ipk_pred[k] + 0.01,
              $sformatf("leg %0d peak %f vs predicted %f", k, ipk[k], ipk_pred[k]));
        check(t_dcm[k] > 0 && rabs(real'(t_dcm[k]) - tf_pred[k]) <= 0.05 * tf_pred[k] + 3.0,
              $sformatf("leg %0d DCM after %0d steps vs predicted %f", k, t_dcm[k], tf_pred[k]));
        if (sync_mode[k]) begin
          n_dt_dcm++;
          check(t_dcm[k] > 0 && t_dcm[k] < DT, $sformatf("leg %0d no DCM inside the dead time", k));
          check(t_dcm2[k] > 0 && rabs(real'(t_dcm2[k]) - t2_pred[k]) <= 0.05 * t2_pred[k] + 3.0,
                $sformatf("leg %0d second DCM after %0d steps vs predicted %f", k, t_dcm2[k], t2_pred[k]));
        end
      end
      if (n >= PER && pos > 600 && pos < PER - 1) begin
        n_dcm_checks++;
        check(dcm[k], $sformatf("leg %0d not in DCM at %0d", k, pos));
        check(rabs(a2r(i_ph[k])) < 0.003, $sformatf("leg %0d DCM current %f", k, a2r(i_ph[k])));
        check(rabs(v2r(u_leg[k]) - v2r(u_out)) < 15.0,
              $sformatf("leg %0d DCM voltage %f vs u_out %f", k, v2r(u_leg[k]), v2r(u_out)));
      end
    end
    n++;
    for (int k = 0; k < NLEG; k++) begin
      int pos;
      pos = (n + k * PER / 3) % PER;
      // a leg switches mode at the start of its own period
      if (pos == 0) sync_mode[k] = n >= NPER / 2 * PER;
      pwm_h[k] = pos < TON;
      pwm_l[k] = sync_mode[k] && pos >= TON + DT && pos < LOW_OFF;
    end
  end

  initial begin
    u_dc = to_volt(600.0); u_batt = to_volt(480.0);
    for (int k = 0; k < NLEG; k++) sync_mode[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (n == NPER * PER + 1);
    @(negedge clk);
    $display("periods with DCM inside the dead time: %0d", n_dt_dcm);
    check(n_dt_dcm >= 3 * (NPER / 2 - 1), "dead-time DCM periods checked");
    $display("pulses checked: %0d, DCM samples checked: %0d, last peak leg0 %f A (predicted %f), fall %0d steps (predicted %f)",
             n_pulses, n_dcm_checks, last_ipk, last_ipk_pred, last_tf, last_tf_pred);
    check(n_pulses == 3 * (NPER - 1), "all pulses checked");
    check(!batt_diode_on, "battery diode should block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * (NPER * PER + 10) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
