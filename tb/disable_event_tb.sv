// Gate-disable event on the full charger model at default parameters.
//
// Interleaved 10 kHz PWM (duty 0.75, 2 us dead time) runs for 1.3 periods,
// then all six gates are switched off, as in the evaluation of the leg
// model. For each leg the testbench records the current at the disable and
// predicts, from the inductor equation alone, when it reaches zero:
//   current out of the leg -> lower diode, leg at about 0 V,
//       t0 = L*|i| / (u_out + drop)
//   current into the leg   -> upper diode, leg at about U_DC,
//       t0 = L*|i| / (U_DC + drop - u_out)
// The leg's DCM flag must first rise within 5 % (plus 3 steps) of that time.
// After it, the current may overshoot by at most 60 mA and must settle below
// 2 mA within 20 us, the leg voltage must settle to the output voltage, and
// the mean DC-link current over the last 20 us must be below 2 mA: the
// disabled bridge must not keep charging the DC link.
module disable_event_tb;
  import hil_pkg::*;

  localparam int NLEG = 3, PER = 1000, HON = 750, DT = 20;
  localparam int N_DIS = 1300, N_END = N_DIS + 800;
  localparam real L = 2.5e-3, TS = 100e-9;

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
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask
  function automatic real v2r(volt_t v); return real'(v) / 2.0**VF; endfunction
  function automatic real a2r(amp_t a);  return real'(a) / 2.0**IF; endfunction
  function automatic real rabs(real x);  return x < 0 ? -x : x; endfunction

  int n = 0;
  real i0[NLEG], t_pred[NLEG], peak[NLEG], idc_sum = 0;
  int  t_dcm[NLEG], n_idc = 0;

  always @(negedge clk) if (rst_n && step_o) begin
    if (n == N_DIS) begin
      for (int k = 0; k < NLEG; k++) begin
        real ul;
        i0[k] = a2r(i_ph[k]);
        // leg voltage during diode conduction (drop ~ 1 V + 10 mOhm*|i|)
        ul = i0[k] > 0 ? -(1.0 + 0.01 * rabs(i0[k])) : 600.0 + 1.0 + 0.01 * rabs(i0[k]);
        t_pred[k] = L * rabs(i0[k]) / rabs(ul - v2r(u_out)) / TS;
        t_dcm[k] = -1;
        peak[k] = 0;
      end
    end
    if (n > N_DIS) begin
      for (int k = 0; k < NLEG; k++) begin
        if (t_dcm[k] < 0 && dcm[k]) t_dcm[k] = n - N_DIS;
        if (t_dcm[k] >= 0 && rabs(a2r(i_ph[k])) > peak[k]) peak[k] = rabs(a2r(i_ph[k]));
      end
      if (n >= N_END - 200) begin
        idc_sum += real'(i_dc) / 2.0**IF;
        n_idc++;
      end
    end
    n++;
    // gates for the next step
    for (int k = 0; k < NLEG; k++) begin
      int pos;
      pos = (n + k * PER / 3) % PER;
      pwm_h[k] = (n < N_DIS) && (pos < HON);
      pwm_l[k] = (n < N_DIS) && (pos >= HON + DT) && (pos < PER - DT);
    end
  end

  initial begin
    u_dc = to_volt(600.0); u_batt = to_volt(450.0);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (n == N_END);
    @(negedge clk);
    for (int k = 0; k < NLEG; k++) begin
      $display("leg %0d: current at disable %f A, zero predicted after %0.1f steps, DCM after %0d steps, overshoot %f A",
               k, i0[k], t_pred[k], t_dcm[k], peak[k]);
      check(rabs(i0[k]) > 0.1, $sformatf("leg %0d carried current at the disable", k));
      check(t_dcm[k] > 0 && rabs(real'(t_dcm[k]) - t_pred[k]) <= 0.05 * t_pred[k] + 3.0,
            $sformatf("leg %0d DCM entry %0d vs predicted %f", k, t_dcm[k], t_pred[k]));
      check(peak[k] < 0.06, $sformatf("leg %0d overshoot %f A", k, peak[k]));
      check(t_dcm[k] > 0 && t_dcm[k] < 800 - 200, $sformatf("leg %0d settled late", k));
      check(rabs(a2r(i_ph[k])) < 0.002, $sformatf("leg %0d final current %f", k, a2r(i_ph[k])));
      check(rabs(v2r(u_leg[k]) - v2r(u_out)) < 15.0, $sformatf("leg %0d voltage %f vs u_out %f", k, v2r(u_leg[k]), v2r(u_out)));
    end
    $display("mean DC-link current over the last 20 us: %f A", idc_sum / n_idc);
    check(rabs(idc_sum / n_idc) < 0.002, "DC link still charged after the disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * N_END + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
