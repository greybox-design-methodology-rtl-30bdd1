// adpll: all-digital phase-locked loop with multi-phase output.
//
// Loop: the TDC measures the phase error between the reference and the
// divided DCO clock once per reference cycle; the PI filter turns it into
// coarse and fine tuning codes; the DCO produces 22 phases of its output;
// phase 0 is divided by N and fed back. In lock the DCO runs at N times the
// reference (750 MHz for a 30 MHz reference and N = 25) and the 22 phases are
// T_out/22 apart, ready for the phase-select multiplexer.
//
// The loop structure (TDC, PI filter, DCO, 1/N) follows the document; the
// reference frequency, N and all loop gains are this design's choices.
// The TDC and DCO are behavioural models, so this module simulates but does
// not synthesize into the analog parts.
module adpll
  import greybox_pkg::*;
#(
  parameter int unsigned DIV_N     = 25,
  parameter int unsigned ERR_W     = 8,
  parameter int unsigned KP_SHIFT  = 2,
  parameter int unsigned KI_SHIFT  = 5,
  parameter int unsigned INIT_WORD = 2400
) (
  input  logic                    ref_clk,
  input  logic                    rst_n,
  output logic [NUM_PHASES-1:0]   phases,
  output logic                    div_clk,
  output logic signed [ERR_W-1:0] phase_err,
  output logic [12:0]             fcw
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [COARSE_W-1:0] coarse;
  logic [FINE_W-1:0]   fine;

  tdc #(.ERR_W(ERR_W)) u_tdc (
    .ref_clk (ref_clk),
    .fb_clk  (div_clk),
    .rst_n   (rst_n),
    .err     (phase_err)
  );

  pi_filter #(
    .ERR_W     (ERR_W),
    .KP_SHIFT  (KP_SHIFT),
    .KI_SHIFT  (KI_SHIFT),
    .INIT_WORD (INIT_WORD)
  ) u_pi (
    .clk    (ref_clk),
    .rst_n  (rst_n),
    .err    (phase_err),
    .word   (fcw),
    .coarse (coarse),
    .fine   (fine)
  );

  dco u_dco (
    .coarse (coarse),
    .fine   (fine),
    .phases (phases)
  );

  freq_divider #(.N(DIV_N)) u_div (
    .clk_in  (phases[0]),
    .rst_n   (rst_n),
    .clk_out (div_clk)
  );
endmodule
