// pi_filter: digital proportional-integral loop filter of the ADPLL.
//
// Once per reference cycle it takes the TDC phase error e and updates
//   acc  <- acc + e * Ki                         (integral path, Ki/(1-z^-1))
//   word <- (acc + e * Kp) rounded down           (proportional path, Kp)
// with Kp = 2^-KP_SHIFT and Ki = 2^-KI_SHIFT, kept in fixed point with FRAC
// fraction bits. word is the DCO frequency control in fine steps (0.3 MHz);
// it is saturated to the tuning range and split into the coarse code
// (word / 100, one coarse step is 30 MHz = 100 fine steps) and the fine code
// (word mod 100). Both outputs are registered.
//
// From the document: the Kp and Ki/(1-z^-1) structure and the coarse and fine
// outputs. This design's choices: power-of-two gains, fixed-point widths, the
// coarse/fine split and INIT_WORD, the word loaded at reset (2400 fine steps
// above the 30 MHz floor is 750 MHz, the nominal clock).
module pi_filter
  import greybox_pkg::*;
#(
  parameter int unsigned ERR_W     = 8,
  parameter int unsigned KP_SHIFT  = 2,
  parameter int unsigned KI_SHIFT  = 5,
  parameter int unsigned FRAC      = 8,
  parameter int unsigned INIT_WORD = 2400,
  parameter int unsigned WORD_W    = 13
) (
  input  logic                    clk,      // reference clock
  input  logic                    rst_n,
  input  logic signed [ERR_W-1:0] err,
  output logic [WORD_W-1:0]       word,
  output logic [COARSE_W-1:0]     coarse,
  output logic [FINE_W-1:0]       fine
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned ACC_W    = WORD_W + FRAC + 2;
  localparam int unsigned WORD_MAX = (2 ** COARSE_W - 1) * FINE_PER_COARSE + FINE_PER_COARSE - 1;

  logic signed [ACC_W-1:0] acc, acc_next, sum, err_ext;
  logic signed [ACC_W-1:0] word_full;
  logic [WORD_W-1:0]       word_next;

  always_comb begin
    err_ext  = ACC_W'(err);
    acc_next = acc + ((err_ext <<< FRAC) >>> KI_SHIFT);
    // Keep the integrator inside the tuning range.
    if (acc_next < 0) acc_next = '0;
    if (acc_next > (ACC_W'(WORD_MAX) <<< FRAC)) acc_next = ACC_W'(WORD_MAX) <<< FRAC;
    sum       = acc_next + ((err_ext <<< FRAC) >>> KP_SHIFT);
    word_full = sum >>> FRAC;
    if (word_full < 0)                    word_next = '0;
    else if (word_full > ACC_W'(WORD_MAX)) word_next = WORD_W'(WORD_MAX);
    else                                  word_next = WORD_W'(word_full);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= ACC_W'(INIT_WORD) <<< FRAC;
      word   <= WORD_W'(INIT_WORD);
      coarse <= COARSE_W'(INIT_WORD / FINE_PER_COARSE);
      fine   <= FINE_W'(INIT_WORD % FINE_PER_COARSE);
    end else begin
      acc    <= acc_next;
      word   <= word_next;
      coarse <= COARSE_W'(word_next / WORD_W'(FINE_PER_COARSE));
      fine   <= FINE_W'(word_next % WORD_W'(FINE_PER_COARSE));
    end
  end
endmodule
