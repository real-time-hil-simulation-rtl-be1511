// Checks the saturation-limit selection for all four gate combinations with
// random bus voltages and device drops, against limits worked out from which
// device conducts in each direction.
module leg_limits_tb;
  import hil_pkg::*;
  volt_t u_dc, d_h_drop, d_l_drop, sw_h_drop, sw_l_drop, hi_lim, lo_lim;
  logic pwm_h, pwm_l;
  int checks = 0, failures = 0;

  leg_limits dut (.*);

  function automatic real v2r(volt_t v); return real'(v) / 2.0**VF; endfunction
  function automatic bit near(real a, real b); return (a - b < 1e-5) && (b - a < 1e-5); endfunction
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    real udc, dh, dl, sh, sl, ehi, elo;
    for (int t = 0; t < 500; t++) begin
      udc = 100.0 + real'($urandom_range(0, 700000)) / 1000.0;
      dh  = real'($urandom_range(0, 3000)) / 1000.0;
      dl  = real'($urandom_range(0, 3000)) / 1000.0;
      sh  = real'($urandom_range(0, 3000)) / 1000.0;
      sl  = real'($urandom_range(0, 3000)) / 1000.0;
      u_dc = to_volt(udc); d_h_drop = to_volt(dh); d_l_drop = to_volt(dl);
      sw_h_drop = to_volt(sh); sw_l_drop = to_volt(sl);
      {pwm_h, pwm_l} = 2'(t);
      #1;
      udc = v2r(u_dc); dh = v2r(d_h_drop); dl = v2r(d_l_drop); sh = v2r(sw_h_drop); sl = v2r(sw_l_drop);
      // current into the node: lower switch if on, else upper diode
      ehi = pwm_l ? -udc / 2 + sl : udc / 2 + dh;
      // current out of the node: upper switch if on, else lower diode
      elo = pwm_h ?  udc / 2 - sh : -udc / 2 - dl;
      check(near(v2r(hi_lim), ehi), $sformatf("hi %f expected %f (h=%0b l=%0b)", v2r(hi_lim), ehi, pwm_h, pwm_l));
      check(near(v2r(lo_lim), elo), $sformatf("lo %f expected %f (h=%0b l=%0b)", v2r(lo_lim), elo, pwm_h, pwm_l));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
