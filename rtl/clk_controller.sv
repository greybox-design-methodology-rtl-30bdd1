// clk_controller: instruction-based dynamic clock period control.
//
// Each cycle it reads the 3-bit control value of the word just fetched and
// decodes it into a signed phase step n, the number of DCO phases (each
// T_out/22 long) by which the next clock cycle is shortened (n > 0) or
// stretched (n < 0). It drives the phase multiplexer
// with the next selection, its target selection minus n modulo 22. The multiplexer
// takes that selection at its next rising edge, so a control value fetched in
// cycle k sets the length of cycle k+1: the value is encoded one cycle ahead of
// the cycle it governs, which leaves a whole cycle for this decode.
//
// After a pipeline flush (pc_recover) the pipeline is empty and its first
// instructions are short, so the controller uses the shortest period for
// RECOVER_CYCLES cycles, whatever the fetched words say. With dyn_en low the
// step is always 0 and the clock runs at the PLL period (conventional clocking).
//
// From the document: 3-bit control value in the instruction word, one-cycle
// early encoding, 5-bit selection, shrink by n phases, short period after PC
// recover. Choices of this design: the code-to-bound table (greybox_pkg), the
// safety margin MARGIN_PS (0 by default), the length of the post-flush window
// and the dyn_en mode input. In the main configuration the PLL runs at T_clk,
// every bound is at most T_clk and only shortening occurs; with the PLL set
// faster (T_OUT_PS below T_clk) the longer bounds give negative steps, which
// stretch the cycle.
module clk_controller
  import greybox_pkg::*;
#(
  parameter int unsigned T_OUT_PS       = T_CLK_PS,  // PLL output period
  parameter int unsigned MARGIN_PS      = 0,         // t_jitter + t_PVT
  parameter int unsigned RECOVER_CYCLES = 3
) (
  input  logic       clk,         // dynamic pipeline clock
  input  logic       rst_n,
  input  logic       dyn_en,      // 1: per-instruction clocking, 0: fixed period
  input  tcode_t     tcode,       // control value of the fetched word
  input  logic       pc_recover,  // pipeline flush (branch taken, ldr pc)
  input  phase_sel_t sel_cur,     // multiplexer's target for this cycle
  output phase_sel_t sel_next,    // selection for the next cycle
  output logic signed [4:0] step, // phases dropped (<0: added) next cycle
  output logic       recovering   // next cycle is a post-flush short cycle
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned RC_W = $clog2(RECOVER_CYCLES + 1);

  // Decode table, one entry per control value, fixed at elaboration.
  logic signed [4:0] step_lut [2**TCODE_W];
  for (genvar c = 0; c < 2**TCODE_W; c++) begin : g_lut
    assign step_lut[c] = 5'(phase_step(tcode_t'(c), T_OUT_PS, MARGIN_PS));
  end

  int sel_tmp;

  logic [RC_W-1:0] recover_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                recover_cnt <= '0;
    else if (pc_recover)       recover_cnt <= RC_W'(RECOVER_CYCLES - 1);
    else if (recover_cnt != 0) recover_cnt <= recover_cnt - 1'b1;
  end

  assign recovering = pc_recover || (recover_cnt != 0);

  always_comb begin
    if (!dyn_en)         step = '0;
    else if (recovering) step = step_lut[0];
    else                 step = step_lut[tcode];
    // Moving the selection n phases back makes the next edge n*T_out/22
    // early; moving it forward makes it late.
    sel_tmp = int'(sel_cur) - int'(step);
    if (sel_tmp < 0)                sel_tmp = sel_tmp + int'(NUM_PHASES);
    if (sel_tmp >= int'(NUM_PHASES)) sel_tmp = sel_tmp - int'(NUM_PHASES);
    sel_next = SEL_W'(sel_tmp);
  end
endmodule
