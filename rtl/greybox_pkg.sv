// greybox_pkg: constants and types shared by the ultra-dynamic clock system.
//
// The system stretches or shrinks every pipeline clock cycle to the delay bound
// of the instruction that runs in it. Each program word carries a 3-bit clock
// control value beside the 32-bit instruction. The controller turns that value
// into a phase step n; the glitch-less multiplexer then picks a DCO phase n
// positions earlier (or later, for negative n), so the next cycle lasts
// T_out - n*T_out/22.
//
// From the document: 22 DCO phases (11-stage ring), 5-bit phase select, 3-bit
// control value, clock range 0.8 ns to T_clk in 0.1 ns steps, T_clk = 1.33 ns
// (750 MHz), 6-bit coarse and 7-bit fine DCO tuning with 30 MHz and 0.3 MHz
// steps. Choices of this design: how the 3-bit value maps onto the delay bound
// (code k -> 0.8 ns + k*0.1 ns for k = 0..5, codes 6 and 7 -> T_clk), and that the
// control value sits in a separate 3-bit field of the stored program word.
package greybox_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned NUM_PHASES = 22;  // 11-stage ring, both edges
  localparam int unsigned SEL_W      = 5;   // phase select width
  localparam int unsigned TCODE_W    = 3;   // per-instruction clock control value
  localparam int unsigned INSTR_W    = 32;  // ARMv5 instruction
  localparam int unsigned COARSE_W   = 6;
  localparam int unsigned FINE_W     = 7;
  // Fine codes per coarse step: 30 MHz / 0.3 MHz.
  localparam int unsigned FINE_PER_COARSE = 100;

  // Clock plan in picoseconds.
  localparam int unsigned T_CLK_PS   = 1333;  // conventional period, 750 MHz
  localparam int unsigned T_MIN_PS   = 800;   // shortest dynamic period
  localparam int unsigned T_STEP_PS  = 100;   // adjustment step
  // Largest phase step, either way, the multiplexer can take without a
  // glitch: old and new phase must both be high when it switches.
  localparam int unsigned MAX_STEP   = NUM_PHASES / 2 - 1;

  typedef logic [TCODE_W-1:0] tcode_t;
  typedef logic [SEL_W-1:0]   phase_sel_t;

  // One program word: clock control value travelling with its instruction.
  typedef struct packed {
    tcode_t             tcode;
    logic [INSTR_W-1:0] instr;
  } tagged_instr_t;

  // Delay bound T_bound, in ps, that a control value stands for.
  function automatic int unsigned tbound_ps(input tcode_t code);
    if (int'(code) <= 5) return T_MIN_PS + int'(code) * T_STEP_PS;
    return T_CLK_PS;
  endfunction

  // Signed phase step for a control value. Positive n shortens the cycle to
  // T_out - n*T_out/22, the largest such n that still covers T_bound plus a
  // safety margin (jitter, PVT). Where the bound exceeds T_out (PLL set faster
  // than T_clk) the step is negative and stretches the cycle to
  // T_out + |n|*T_out/22, the smallest such |n| that covers it.
  // Limited to +-MAX_STEP.
  function automatic int phase_step(input tcode_t code, input int unsigned t_out_ps,
                                    input int unsigned margin_ps);
    int need;
    int n;
    need = int'(tbound_ps(code) + margin_ps);
    if (need <= int'(t_out_ps))
      n = ((int'(t_out_ps) - need) * int'(NUM_PHASES)) / int'(t_out_ps);
    else
      n = -(((need - int'(t_out_ps)) * int'(NUM_PHASES) + int'(t_out_ps) - 1) / int'(t_out_ps));
    if (n > int'(MAX_STEP))  n = int'(MAX_STEP);
    if (n < -int'(MAX_STEP)) n = -int'(MAX_STEP);
    return n;
  endfunction
endpackage
