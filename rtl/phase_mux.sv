// phase_mux: glitch-less 22:1 phase-select multiplexer.
//
// Passes one of the 22 equally spaced DCO phases (t_delay = T_out/22 apart) to
// clk_out, the dynamic pipeline clock. A selection change is glitch-free only
// while the old and the new phase are both high, so the switching instant
// depends on the direction of the step:
//  - backward step n = 0..10 (shorter cycle, T_out - n*t_delay): taken at the
//    rising edge of clk_out. The new phase rose n*t_delay earlier and is still
//    high, so the output does not move and its next edge comes early.
//  - forward step n = 1..10 (longer cycle, T_out + n*t_delay): taken at the
//    rising edge of the strobe, the phase 10 positions after the old one,
//    10*t_delay into the cycle. By then the new phase has risen and the old
//    one has not yet fallen.
// Registers: at each rising edge of clk_out, prev_q keeps the selection in use
// and req_q takes sel_req from the controller; tog_a toggles. At the strobe's
// rising edge tog_b copies tog_a, which marks the cycle's forward step as
// applied. The selection in use is req_q, except during a forward step before
// its strobe, when it is still prev_q. sel_cur reports req_q, the selection
// that will be in use at the end of the cycle; the controller steps from it.
// The strobe select (prev_q + 10) changes only at a rising edge of clk_out,
// when both the old and the new strobe phase are low, so it is glitch-free too.
//
// From the document: 22 phases into one glitch-less multiplexer with a 5-bit
// selection, T_shrink = T_out - n*t_delay and T_stretch = T_out + n*t_delay.
// The switching scheme, the +-10 step limit and the reset to phase 0 are this
// design's choices. An assertion flags any request outside the +-10 range.
module phase_mux
  import greybox_pkg::*;
(
  input  logic [NUM_PHASES-1:0] phases,
  input  logic                  rst_n,
  input  phase_sel_t            sel_req,
  output phase_sel_t            sel_cur,
  output logic                  clk_out
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int STROBE_OFS = int'(MAX_STEP);

  phase_sel_t prev_q, req_q, sel_use, strobe_sel;
  logic       tog_a, tog_b;
  logic       strobe;
  logic       fwd;

  function automatic int unsigned fwd_dist(input phase_sel_t from, input phase_sel_t to);
    return (int'(to) + NUM_PHASES - int'(from)) % NUM_PHASES;
  endfunction

  function automatic int unsigned back_dist(input phase_sel_t from, input phase_sel_t to);
    return (int'(from) + NUM_PHASES - int'(to)) % NUM_PHASES;
  endfunction

  always_comb begin
    fwd        = (fwd_dist(prev_q, req_q) != 0) && (fwd_dist(prev_q, req_q) <= MAX_STEP);
    sel_use    = (fwd && (tog_a != tog_b)) ? prev_q : req_q;
    strobe_sel = phase_sel_t'((int'(prev_q) + STROBE_OFS) % NUM_PHASES);
  end

  assign strobe  = phases[strobe_sel];
  assign clk_out = phases[sel_use];
  assign sel_cur = req_q;

  always_ff @(posedge clk_out or negedge rst_n) begin
    if (!rst_n) begin
      prev_q <= '0;
      req_q  <= '0;
      tog_a  <= 1'b0;
    end else begin
      assert (int'(sel_req) < NUM_PHASES &&
              (back_dist(sel_use, sel_req) <= MAX_STEP || fwd_dist(sel_use, sel_req) <= MAX_STEP))
        else $error("phase_mux: selection %0d -> %0d is out of range", sel_use, sel_req);
      prev_q <= sel_use;
      req_q  <= sel_req;
      tog_a  <= ~tog_a;
    end
  end

  always_ff @(posedge strobe or negedge rst_n) begin
    if (!rst_n) tog_b <= 1'b0;
    else        tog_b <= tog_a;
  end
endmodule
