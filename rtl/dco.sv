// dco: behavioural model of the digitally controlled ring oscillator.
//
// Behavioural model, not synthesizable: the real part is an analog ring array
// whose frequency rises with the number of enabled inverter rings (coarse bank
// C[]) and falls with the switched load capacitance (fine bank F[]).
//
// The model produces NUM_PHASES (22) square waves of equal period, phase k
// lagging phase 0 by k*T_out/22, as the two edges of an 11-stage ring give.
// Output frequency:
//   f = F_MIN_KHZ + coarse * COARSE_STEP_KHZ + fine * FINE_STEP_KHZ
// with the document's 30 MHz coarse and 0.3 MHz fine steps and 30 MHz bottom of
// range (6-bit coarse, 7-bit fine; top of range near 2 GHz). The tuning words
// are re-read every phase step (T_out/22), so a change takes effect within
// one phase interval. The linear law and the 30 MHz offset are choices of this
// model; the document gives the resolutions and the range only.
module dco
  import greybox_pkg::*;
#(
  parameter int unsigned F_MIN_KHZ       = 30000,
  parameter int unsigned COARSE_STEP_KHZ = 30000,
  parameter int unsigned FINE_STEP_KHZ   = 300
) (
  input  logic [COARSE_W-1:0]   coarse,
  input  logic [FINE_W-1:0]     fine,
  output logic [NUM_PHASES-1:0] phases
);
  timeunit 1ps;
  timeprecision 1fs;

  real f_mhz;
  real t_step_ps;
  int  idx;

  initial begin
    idx    = 0;
    for (int k = 0; k < NUM_PHASES; k++) phases[k] = ((NUM_PHASES - k) % NUM_PHASES) < NUM_PHASES / 2;
  end

  // One pass per phase interval: wait T_out/22 at the present tuning, then
  // advance the ring position.
  always begin
    f_mhz     = (real'(F_MIN_KHZ) + real'(coarse) * real'(COARSE_STEP_KHZ)
                 + real'(fine) * real'(FINE_STEP_KHZ)) / 1000.0;
    t_step_ps = 1.0e6 / (f_mhz * real'(NUM_PHASES));
    #(t_step_ps);
    idx = (idx + 1) % NUM_PHASES;
    // Phase k is high for the half period that starts when idx reaches k.
    for (int k = 0; k < NUM_PHASES; k++)
      phases[k] = ((idx - k + NUM_PHASES) % NUM_PHASES) < NUM_PHASES / 2;
  end
endmodule
