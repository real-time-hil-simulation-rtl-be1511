// Saturated discrete-time PI controller that produces a phase-leg voltage.
//
// The controller drives the leg current towards zero whenever neither
// switch forces the leg voltage, so a model running at a fixed 100 ns step
// settles into discontinuous conduction with the correct average leg voltage
// instead of chattering between the rails. It is built in the
// automatic-reset form: the proportional path i*Ap is added to a state s
// that is a first-order low-pass of the saturated output,
//     u    = Ap * clamp(i, -Ilim, +Ilim) + s(n-1)
//     y    = clamp(u, lo_lim, hi_lim)
//     s(n) = s(n-1) + (Ts/Ti) * (y - s(n-1))
// Because s follows the clamped output, the integral action cannot wind up.
// Electrically this is a series R-C (R = Ap, R*C = Ti) hanging on the leg
// node. The input limit Ilim = U_DC/Ap bounds the proportional term to one
// bus voltage, which keeps the word widths small.
//
// Structure, parameter values (Ap = 17.5 kOhm, Ti = 812 ns, Ts = 100 ns) and
// the Ilim formula follow the published controller; word widths are this
// design's. i_ac is the current into the leg node, y is relative to the bus
// midpoint. y is combinational from i_ac, the limits and the state; the
// state register advances on each step strobe.
module sat_pi
  import hil_pkg::*;
#(
  parameter real DISC_AP  = 17.5e3,    // proportional gain [ohm]
  parameter real DISC_TI  = 812.0e-9,  // integral time constant [s]
  parameter real DISC_TS  = 100.0e-9,  // model time step [s]
  parameter real U_DC_NOM = 600.0,     // bus voltage used for Ilim [V]
  parameter real ILIM     = U_DC_NOM / DISC_AP  // input limit [A]
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  step,
  input  amp_t  i_ac,     // current into the leg node
  input  volt_t hi_lim,
  input  volt_t lo_lim,
  output volt_t y,        // saturated output (leg voltage)
  output logic  sat_hi,   // output held at the high limit
  output logic  sat_lo,   // output held at the low limit
  output logic  i_limited // input current clipped to +/-Ilim
);

  localparam int SX = 12;               // extra state fractional bits
  localparam int SW = VW + SX;          // state width
  localparam int KF = 18;               // Ts/Ti coefficient fraction
  localparam longint AP_FIX   = fix(DISC_AP, int'(VF) - int'(IF));
  localparam longint K_FIX    = fix(DISC_TS / DISC_TI, KF);
  localparam amp_t   ILIM_FIX = to_amp(ILIM);

  logic signed [SW-1:0] s_q;
  amp_t                 i_c;
  logic signed [63:0]   p;
  logic signed [95:0]   u;
  logic signed [95:0]   e;
  logic signed [SW-1:0] s_d;

  always_comb begin
    i_limited = 1'b1;
    if (i_ac > ILIM_FIX)       i_c = ILIM_FIX;
    else if (i_ac < -ILIM_FIX) i_c = -ILIM_FIX;
    else begin
      i_c       = i_ac;
      i_limited = 1'b0;
    end
    p = 64'(i_c) * 64'(AP_FIX);
    u = 96'(p) + 96'(s_q >>> SX);
    sat_hi = 1'b0;
    sat_lo = 1'b0;
    if (u >= 96'(hi_lim)) begin
      y      = hi_lim;
      sat_hi = 1'b1;
    end else if (u <= 96'(lo_lim)) begin
      y      = lo_lim;
      sat_lo = 1'b1;
    end else begin
      y = volt_t'(u);
    end
    // Low-pass update of the state towards the saturated output.
    e   = ((96'(y) <<< SX) - 96'(s_q)) * 96'(K_FIX);
    s_d = SW'(96'(s_q) + (e >>> KF));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    s_q <= '0;
    else if (step) s_q <= s_d;
  end

endmodule
