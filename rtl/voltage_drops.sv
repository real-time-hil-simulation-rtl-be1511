// Conduction voltage drops of one two-level phase leg.
//
// Gives the forward voltage of the upper and lower diodes and of the upper
// and lower switches for the present leg current. Each device is modelled by
// a threshold voltage plus a slope resistance, drop = U0 + r*|i_ac|, which is
// the simplest characteristic that grows with current; the published model
// only names this block. The drops are magnitudes (never negative); the
// limit selection adds or subtracts them according to the device's position.
//
// i_ac is the current flowing from the AC side into the leg's switched node.
// The outputs are registered on the time-step strobe, i.e. they lag the
// current by one model time step, like the delay placed in front of the
// lookup tables in the published model.
module voltage_drops
  import hil_pkg::*;
#(
  parameter real DIODE_U0  = 1.0,    // diode threshold voltage [V]
  parameter real DIODE_R   = 0.010,  // diode slope resistance [ohm]
  parameter real SWITCH_U0 = 1.0,    // switch threshold voltage [V]
  parameter real SWITCH_R  = 0.015   // switch slope resistance [ohm]
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  step,        // one pulse per model time step
  input  amp_t  i_ac,        // current into the leg node
  output volt_t d_h_drop,    // upper diode drop
  output volt_t d_l_drop,    // lower diode drop
  output volt_t sw_h_drop,   // upper switch drop
  output volt_t sw_l_drop    // lower switch drop
);

  // Slope resistances scaled from A (IF bits) to V (VF bits), with RF extra
  // fractional bits of coefficient precision.
  localparam int RF = 12;
  localparam longint RD_FIX = fix(DIODE_R,  int'(VF) - int'(IF) + RF);
  localparam longint RS_FIX = fix(SWITCH_R, int'(VF) - int'(IF) + RF);
  localparam volt_t  UD0    = to_volt(DIODE_U0);
  localparam volt_t  US0    = to_volt(SWITCH_U0);

  logic signed [IW:0]  i_abs;
  logic signed [63:0]  d_prod, s_prod;
  volt_t               d_drop, s_drop;

  always_comb begin
    i_abs  = (i_ac < 0) ? -(IW+1)'(i_ac) : (IW+1)'(i_ac);
    d_prod = (64'(i_abs) * 64'(RD_FIX)) >>> RF;
    s_prod = (64'(i_abs) * 64'(RS_FIX)) >>> RF;
    d_drop = sat_volt(96'(d_prod) + 96'(UD0));
    s_drop = sat_volt(96'(s_prod) + 96'(US0));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_h_drop  <= '0;
      d_l_drop  <= '0;
      sw_h_drop <= '0;
      sw_l_drop <= '0;
    end else if (step) begin
      d_h_drop  <= d_drop;
      d_l_drop  <= d_drop;
      sw_h_drop <= s_drop;
      sw_l_drop <= s_drop;
    end
  end

endmodule
