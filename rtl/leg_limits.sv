// Saturation-limit selection of a two-level phase leg.
//
// The leg voltage is expressed relative to the DC-bus midpoint, so the rails
// sit at +U_DC/2 and -U_DC/2. The high limit is the voltage the leg takes when
// current flows into the node: through the lower switch (-U_DC/2 + its drop)
// if the lower gate is on, otherwise through the upper diode (+U_DC/2 + its
// drop). The low limit is the voltage for current flowing out of the node:
// through the upper switch (+U_DC/2 - its drop) if the upper gate is on,
// otherwise through the lower diode (-U_DC/2 - its drop). With both gates off
// the limits span the whole bus; with one gate on they pin the leg to one
// rail. This selection follows the published bridge-arm structure; the signs
// of the drops are derived from which device conducts in each case.
// Purely combinational.
module leg_limits
  import hil_pkg::*;
(
  input  volt_t u_dc,        // DC bus voltage
  input  logic  pwm_h,       // upper switch gate
  input  logic  pwm_l,       // lower switch gate
  input  volt_t d_h_drop,
  input  volt_t d_l_drop,
  input  volt_t sw_h_drop,
  input  volt_t sw_l_drop,
  output volt_t hi_lim,
  output volt_t lo_lim
);

  volt_t half;

  always_comb begin
    half   = u_dc >>> 1;
    hi_lim = pwm_l ? sat_volt(-96'(half) + 96'(sw_l_drop))
                   : sat_volt( 96'(half) + 96'(d_h_drop));
    lo_lim = pwm_h ? sat_volt( 96'(half) - 96'(sw_h_drop))
                   : sat_volt(-96'(half) - 96'(d_l_drop));
  end

endmodule
