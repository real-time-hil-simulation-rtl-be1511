// Model of one inductively loaded two-level phase leg (bridge arm).
//
// Replaces the usual switching-function leg model. The conduction drops of
// the four devices and the two gate signals define a high and a low voltage
// limit; a saturated PI controller, fed with the leg current, chooses the
// leg voltage between them. While a gate is on, or while current flows
// through a diode, the output sits on a limit and the leg behaves like an
// ideal switch with drops. When both gates are off and the current has
// reached zero, the controller leaves the limits and holds the current at
// zero, which reproduces discontinuous conduction and the disabled bridge.
// This structure is the published one; the drop characteristic and the way
// the DC-rail current is attributed are choices of this design.
//
// Interface: i_ac is the current into the leg node (A, 11 fractional bits);
// u_leg is relative to the bus midpoint and u_leg_n to the negative rail
// (V, 21 fractional bits). upper_path is high while the leg current is
// carried by the upper switch or diode, so it flows in the positive rail.
// Timing: u_leg is combinational from i_ac and the gates; the drops and the
// PI state advance once per step strobe.
module phase_leg
  import hil_pkg::*;
#(
  parameter real DISC_AP  = 17.5e3,
  parameter real DISC_TI  = 812.0e-9,
  parameter real DISC_TS  = 100.0e-9,
  parameter real U_DC_NOM = 600.0,
  parameter real DIODE_U0  = 1.0,
  parameter real DIODE_R   = 0.010,
  parameter real SWITCH_U0 = 1.0,
  parameter real SWITCH_R  = 0.015
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  step,
  input  volt_t u_dc,
  input  logic  pwm_h,
  input  logic  pwm_l,
  input  amp_t  i_ac,        // current into the leg node
  output volt_t u_leg,       // leg voltage, midpoint reference
  output volt_t u_leg_n,     // leg voltage, negative-rail reference
  output logic  upper_path,  // current flows through the upper devices
  output logic  dcm,         // both gates off and output between limits
  output logic  sat_hi,
  output logic  sat_lo,
  output logic  i_limited
);

  volt_t d_h_drop, d_l_drop, sw_h_drop, sw_l_drop;
  volt_t hi_lim, lo_lim;

  voltage_drops #(
    .DIODE_U0(DIODE_U0), .DIODE_R(DIODE_R),
    .SWITCH_U0(SWITCH_U0), .SWITCH_R(SWITCH_R)
  ) u_drops (
    .clk, .rst_n, .step, .i_ac,
    .d_h_drop, .d_l_drop, .sw_h_drop, .sw_l_drop
  );

  leg_limits u_limits (
    .u_dc, .pwm_h, .pwm_l,
    .d_h_drop, .d_l_drop, .sw_h_drop, .sw_l_drop,
    .hi_lim, .lo_lim
  );

  sat_pi #(
    .DISC_AP(DISC_AP), .DISC_TI(DISC_TI), .DISC_TS(DISC_TS),
    .U_DC_NOM(U_DC_NOM)
  ) u_pi (
    .clk, .rst_n, .step, .i_ac, .hi_lim, .lo_lim,
    .y(u_leg), .sat_hi, .sat_lo, .i_limited
  );

  always_comb begin
    u_leg_n    = sat_volt(96'(u_leg) + 96'(u_dc >>> 1));
    // Upper gate on: the upper switch or its diode carries the current.
    // Lower gate on: the lower devices do. Both off: the upper diode only
    // when the output is clamped to the high limit.
    if (pwm_h)      upper_path = 1'b1;
    else if (pwm_l) upper_path = 1'b0;
    else            upper_path = sat_hi;
    dcm = !pwm_h && !pwm_l && !sat_hi && !sat_lo;
  end

endmodule
