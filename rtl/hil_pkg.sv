// Shared fixed-point formats and helpers for the real-time converter model.
//
// Every electrical quantity of the model is a two's-complement fixed-point
// number. Currents carry 11 fractional bits in an 18-bit word (resolution
// 0.49 mA, range +/-64 A) and voltages carry 21 fractional bits; both
// fraction widths follow the published model. A 600 V bus does not fit in 18
// bits with 21 fractional bits, so voltages use a 32-bit word (range
// +/-1024 V), which is a choice of this design. Integrator state registers
// (the accumulators) keep extra fractional bits so that the very small
// per-step increments of a 100 ns forward-Euler step are not lost.
//
// The helpers convert real-valued parameters (ohms, henries, seconds) into
// integer coefficients at elaboration time and saturate wide intermediate
// results back into the signal formats.
package hil_pkg;

  // Signal formats.
  localparam int unsigned IW = 18;   // current word width
  localparam int unsigned IF = 11;   // current fractional bits
  localparam int unsigned VW = 32;   // voltage word width
  localparam int unsigned VF = 21;   // voltage fractional bits

  typedef logic signed [IW-1:0] amp_t;
  typedef logic signed [VW-1:0] volt_t;

  localparam amp_t AMP_MAX  = amp_t'({1'b0, {(IW-1){1'b1}}});
  localparam amp_t AMP_MIN  = amp_t'({1'b1, {(IW-1){1'b0}}});
  localparam volt_t VOLT_MAX = volt_t'({1'b0, {(VW-1){1'b1}}});
  localparam volt_t VOLT_MIN = volt_t'({1'b1, {(VW-1){1'b0}}});

  // Real value -> integer with frac fractional bits, rounded to nearest.
  function automatic longint fix(input real x, input int frac);
    return longint'(x * (2.0 ** frac));
  endfunction

  function automatic volt_t to_volt(input real v);
    return volt_t'(fix(v, VF));
  endfunction

  function automatic amp_t to_amp(input real a);
    return amp_t'(fix(a, IF));
  endfunction

  // Saturate a wide signed value into the current / voltage word.
  function automatic amp_t sat_amp(input logic signed [95:0] x);
    if (x > 96'(signed'(AMP_MAX))) return AMP_MAX;
    if (x < 96'(signed'(AMP_MIN))) return AMP_MIN;
    return amp_t'(x);
  endfunction

  function automatic volt_t sat_volt(input logic signed [95:0] x);
    if (x > 96'(signed'(VOLT_MAX))) return VOLT_MAX;
    if (x < 96'(signed'(VOLT_MIN))) return VOLT_MIN;
    return volt_t'(x);
  endfunction

endpackage
