// Forward-Euler model of one series R-L filter branch.
//
// Integrates L di/dt = u_a - u_b - R_s*i once per model time step:
//     i(n+1) = i(n) + (Ts/L) * (u_a - u_b - R_s*i(n))
// u_a is the leg voltage and u_b the output-capacitor voltage, both against
// the negative rail; i flows from the leg towards the capacitor. With
// Ts = 100 ns and L = 2.5 mH one volt moves the current by only 40 uA per
// step, less than one current LSB, so the state keeps ACC_X extra fractional
// bits beyond the 11 of the output current. The state saturates at the
// current word's range. Component values are those of the published test
// circuit; the word widths are this design's. Reset clears the current.
// Output i is the registered state (one-step latency from u_a, u_b).
module inductor_branch
  import hil_pkg::*;
#(
  parameter real L_H  = 2.5e-3,    // inductance [H]
  parameter real RS   = 50.0e-3,   // series resistance [ohm]
  parameter real TS   = 100.0e-9   // model time step [s]
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  step,
  input  volt_t u_a,     // leg-side voltage
  input  volt_t u_b,     // load-side voltage
  output amp_t  i        // branch current, from u_a towards u_b
);

  localparam int ACC_X = 20;                 // extra current fraction
  localparam int AW    = IW + ACC_X;         // state width
  localparam int RF    = 8;                  // R_s coefficient extra bits
  localparam int KLF   = 38;                 // Ts/L coefficient fraction
  localparam longint RS_FIX = fix(RS, int'(VF) - int'(IF) + RF);
  localparam longint KL_FIX = fix(TS / L_H, KLF);
  localparam int KSH   = int'(VF) + KLF - (int'(IF) + ACC_X);
  localparam logic signed [AW-1:0] ACC_MAX = AW'(signed'(AMP_MAX)) <<< ACC_X;
  localparam logic signed [AW-1:0] ACC_MIN = AW'(signed'(AMP_MIN)) <<< ACC_X;

  logic signed [AW-1:0] acc_q, acc_d;
  logic signed [95:0]   v_r, v_drive, di, nxt;

  always_comb begin
    v_r     = (96'(i) * 96'(RS_FIX)) >>> RF;
    v_drive = 96'(u_a) - 96'(u_b) - v_r;
    di      = (v_drive * 96'(KL_FIX)) >>> KSH;
    nxt     = 96'(acc_q) + di;
    if (nxt > 96'(ACC_MAX))      acc_d = ACC_MAX;
    else if (nxt < 96'(ACC_MIN)) acc_d = ACC_MIN;
    else                         acc_d = AW'(nxt);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    acc_q <= '0;
    else if (step) acc_q <= acc_d;
  end

  assign i = amp_t'(acc_q >>> ACC_X);

endmodule
