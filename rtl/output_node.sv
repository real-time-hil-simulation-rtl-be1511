// Forward-Euler model of the charger's output node.
//
// The node holds the output capacitor C with its parallel resistor R_C and
// feeds a battery, modelled as its Thevenin source U_batt behind R_batt and
// an ideal blocking diode that keeps the battery from discharging into the
// node. Once per model time step it integrates
//     i_batt    = max(0, (u_out - u_batt) / R_batt)
//     u_out(n+1) = u_out(n) + (Ts/C) * (i_in - u_out/R_C - i_batt)
// where i_in is the sum of the phase currents entering the node. The
// capacitor voltage keeps 16 extra fractional bits of state; internal
// currents keep 8 extra fractional bits. Component values are those of the
// published test circuit; the ideal diode, the reset value of u_out (the
// 450 V operating point) and the word widths are this design's. u_out is the
// registered state; i_batt is combinational from u_out and u_batt and is
// saturated to the current word.
module output_node
  import hil_pkg::*;
#(
  parameter real C_F    = 1.1e-3,    // output capacitance [F]
  parameter real R_C    = 4.7e3,     // parallel resistor [ohm]
  parameter real R_BATT = 0.2,       // battery internal resistance [ohm]
  parameter real TS     = 100.0e-9,  // model time step [s]
  parameter real U_INIT = 450.0      // capacitor voltage after reset [V]
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                step,
  input  logic signed [IW+1:0] i_in,    // sum of currents into the node
  input  volt_t               u_batt,   // battery source voltage
  output volt_t               u_out,    // capacitor voltage
  output amp_t                i_batt,   // battery charging current
  output logic                d_on      // blocking diode conducts
);

  localparam int UX  = 16;                    // extra voltage state bits
  localparam int UW  = VW + UX;
  localparam int IX  = 8;                     // extra current bits
  localparam int GF  = 40;                    // conductance coefficient fraction
  localparam int KCF = 40;                    // Ts/C coefficient fraction
  localparam longint GRC_FIX = fix(1.0 / R_C,    int'(IF) - int'(VF) + GF);
  localparam longint GB_FIX  = fix(1.0 / R_BATT, int'(IF) - int'(VF) + GF);
  localparam longint KC_FIX  = fix(TS / C_F, KCF);
  localparam int KSH = int'(IF) + IX + KCF - (int'(VF) + UX);
  localparam logic signed [UW-1:0] U_RST  = UW'(signed'(to_volt(U_INIT))) <<< UX;
  localparam logic signed [UW-1:0] UA_MAX = UW'(signed'(VOLT_MAX)) <<< UX;
  localparam logic signed [UW-1:0] UA_MIN = UW'(signed'(VOLT_MIN)) <<< UX;

  logic signed [UW-1:0] acc_q, acc_d;
  logic signed [95:0]   i_rc_x, i_b_x, i_net_x, du, nxt;

  assign u_out = volt_t'(acc_q >>> UX);

  always_comb begin
    i_rc_x = (96'(u_out) * 96'(GRC_FIX)) >>> (GF - IX);
    i_b_x  = ((96'(u_out) - 96'(u_batt)) * 96'(GB_FIX)) >>> (GF - IX);
    d_on   = i_b_x > 0;
    if (!d_on) i_b_x = '0;
    i_batt  = sat_amp(i_b_x >>> IX);
    i_net_x = (96'(i_in) <<< IX) - i_rc_x - i_b_x;
    du      = (i_net_x * 96'(KC_FIX)) >>> KSH;
    nxt     = 96'(acc_q) + du;
    if (nxt > 96'(UA_MAX))      acc_d = UA_MAX;
    else if (nxt < 96'(UA_MIN)) acc_d = UA_MIN;
    else                        acc_d = UW'(nxt);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    acc_q <= U_RST;
    else if (step) acc_q <= acc_d;
  end

endmodule
