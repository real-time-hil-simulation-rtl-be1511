// Real-time hardware-in-the-loop model of a three-phase synchronous buck
// battery charger.
//
// An ideal DC source (u_dc) feeds three two-level phase legs. Each leg
// drives its own series R_s-L filter into a common output capacitor C with a
// parallel resistor R_C, and the capacitor charges a battery (U_batt behind
// R_batt) through a blocking diode. The controller under test drives the six
// gate signals and reads the simulated currents and voltages. The legs use
// the saturated-PI leg model, so when the gates are disabled the phase
// currents settle at zero and the leg voltages follow the output capacitor,
// instead of chattering between the rails as a switching-function model
// does at a fixed step.
//
// The whole circuit advances one forward-Euler step of TS = 100 ns on every
// STEP_DIV-th clock (default: 100 MHz clock, STEP_DIV = 10); step_o marks
// the clock on which the states update. Within a step the path from the
// registered inductor currents through the PI controllers to the next
// inductor currents is combinational. The DC-link current i_dc is the sum
// of the phase currents carried by the upper devices (positive: out of the
// source's positive terminal). Seven first-order sigma-delta modulators
// bring the phase currents (+/-64 A full scale), leg voltages and output
// voltage (+/-1024 V full scale) out as one-bit streams.
//
// Circuit, component values, step and PI tuning are the published test
// system's; the clock rate, the DAC channel assignment and scaling, and the
// reset operating point (450 V on the capacitor, zero currents) are this
// design's. Phase currents i_ph flow from the legs towards the capacitor;
// voltages are against the negative rail. Currents carry 11 and voltages 21
// fractional bits.
module charger_hil_top
  import hil_pkg::*;
#(
  parameter int unsigned NLEG     = 3,
  parameter int unsigned STEP_DIV = 10,        // clocks per model step
  parameter real TS        = 100.0e-9,          // model time step [s]
  parameter real L_H       = 2.5e-3,
  parameter real RS        = 50.0e-3,
  parameter real C_F       = 1.1e-3,
  parameter real R_C       = 4.7e3,
  parameter real R_BATT    = 0.2,
  parameter real U_INIT    = 450.0,
  parameter real U_DC_NOM  = 600.0,
  parameter real DISC_AP   = 17.5e3,
  parameter real DISC_TI   = 812.0e-9
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  volt_t                u_dc,            // DC source voltage
  input  volt_t                u_batt,          // battery source voltage
  input  logic [NLEG-1:0]      pwm_h,           // upper gates
  input  logic [NLEG-1:0]      pwm_l,           // lower gates
  output logic                 step_o,          // model step strobe
  output volt_t                u_leg [NLEG],    // leg voltages
  output amp_t                 i_ph  [NLEG],    // phase currents
  output volt_t                u_out,           // output capacitor voltage
  output amp_t                 i_batt,          // battery current
  output logic signed [IW+1:0] i_dc,            // DC-link current
  output logic [NLEG-1:0]      dcm,             // leg in discontinuous mode
  output logic [NLEG-1:0]      sat_hi,          // leg clamped to high limit
  output logic [NLEG-1:0]      sat_lo,          // leg clamped to low limit
  output logic [NLEG-1:0]      i_limited,       // PI input clipped
  output logic                 batt_diode_on,   // battery diode conducts
  output logic [2*NLEG:0]      dac_bits         // sigma-delta streams
);

  // ---- model step strobe -------------------------------------------------
  localparam int unsigned DW = $clog2(STEP_DIV + 1);
  localparam logic [DW-1:0] DIV_LAST = DW'(STEP_DIV - 1);
  logic [DW-1:0] div_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          div_q <= '0;
    else if (div_q == DIV_LAST)          div_q <= '0;
    else                                 div_q <= div_q + 1'b1;
  end
  assign step_o = (div_q == DIV_LAST);

  // ---- phase legs and filter branches -------------------------------------
  logic [NLEG-1:0] upper_path;

  for (genvar k = 0; k < NLEG; k++) begin : g_leg
    amp_t i_into;
    // The leg model takes the current flowing into its node.
    assign i_into = sat_amp(-96'(i_ph[k]));

    phase_leg #(
      .DISC_AP(DISC_AP), .DISC_TI(DISC_TI), .DISC_TS(TS), .U_DC_NOM(U_DC_NOM)
    ) u_leg_model (
      .clk, .rst_n, .step(step_o), .u_dc,
      .pwm_h(pwm_h[k]), .pwm_l(pwm_l[k]), .i_ac(i_into),
      .u_leg(), .u_leg_n(u_leg[k]),
      .upper_path(upper_path[k]), .dcm(dcm[k]),
      .sat_hi(sat_hi[k]), .sat_lo(sat_lo[k]), .i_limited(i_limited[k])
    );

    inductor_branch #(.L_H(L_H), .RS(RS), .TS(TS)) u_branch (
      .clk, .rst_n, .step(step_o),
      .u_a(u_leg[k]), .u_b(u_out), .i(i_ph[k])
    );
  end

  // ---- output node and DC-link current -----------------------------------
  logic signed [IW+1:0] i_sum;
  always_comb begin
    i_sum = '0;
    i_dc  = '0;
    for (int k = 0; k < NLEG; k++) begin
      i_sum = i_sum + (IW+2)'(i_ph[k]);
      if (upper_path[k]) i_dc = i_dc + (IW+2)'(i_ph[k]);
    end
  end

  output_node #(
    .C_F(C_F), .R_C(R_C), .R_BATT(R_BATT), .TS(TS), .U_INIT(U_INIT)
  ) u_out_node (
    .clk, .rst_n, .step(step_o), .i_in(i_sum), .u_batt,
    .u_out, .i_batt, .d_on(batt_diode_on)
  );

  // ---- analog outputs -----------------------------------------------------
  for (genvar k = 0; k < NLEG; k++) begin : g_dac
    sigma_delta_dac #(.W(16)) u_dac_i (
      .clk, .rst_n, .x(i_ph[k][IW-1 -: 16]), .bit_o(dac_bits[k])
    );
    sigma_delta_dac #(.W(16)) u_dac_u (
      .clk, .rst_n, .x(u_leg[k][VW-1 -: 16]), .bit_o(dac_bits[NLEG + k])
    );
  end
  sigma_delta_dac #(.W(16)) u_dac_out (
    .clk, .rst_n, .x(u_out[VW-1 -: 16]), .bit_o(dac_bits[2*NLEG])
  );

endmodule
