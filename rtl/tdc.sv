// tdc: behavioural model of the time-to-digital converter of the ADPLL.
//
// Behavioural model, not synthesizable: a real TDC is a delay-line circuit.
// At each rising edge of the divided clock fb_clk it measures the time since
// the last rising edge of ref_clk, folds it into (-T_ref/2, T_ref/2] using the
// measured reference period, and outputs it in units of RES_FS (10 ps), rounded and
// saturated to ERR_W signed bits. Positive err means the feedback edge lags the
// reference. err holds its value until the next feedback edge.
//
// The document names the TDC as the loop's phase detector and gives nothing
// of its resolution, range or timing; RES_FS, ERR_W and the folding are choices
// of this model.
module tdc #(
  parameter int unsigned RES_FS = 10000,  // resolution, 10 ps
  parameter int unsigned ERR_W  = 8
) (
  input  logic                    ref_clk,
  input  logic                    fb_clk,
  input  logic                    rst_n,
  output logic signed [ERR_W-1:0] err
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int ERR_MAX = 2 ** (ERR_W - 1) - 1;

  realtime t_ref_last;
  realtime t_ref_period;

  // Time since the reference edge, folded and quantised to a saturated code.
  function automatic int tdc_code(input real since_ref, input real t_ref);
    real dt;
    int  code;
    dt = since_ref;
    if (dt > t_ref / 2.0) dt = dt - t_ref;
    code = $rtoi((dt >= 0.0) ? (dt * 1000.0 / real'(RES_FS) + 0.5)
                              : (dt * 1000.0 / real'(RES_FS) - 0.5));
    if (code > ERR_MAX)  code = ERR_MAX;
    if (code < -ERR_MAX) code = -ERR_MAX;
    return code;
  endfunction

  initial begin
    err          = '0;
    t_ref_last   = 0;
    t_ref_period = 0;
  end

  always @(posedge ref_clk) begin
    if (t_ref_last > 0) t_ref_period <= $realtime - t_ref_last;
    t_ref_last <= $realtime;
  end

  always @(posedge fb_clk or negedge rst_n) begin
    if (!rst_n)                err <= '0;
    else if (t_ref_period > 0) err <= ERR_W'(tdc_code($realtime - t_ref_last, t_ref_period));
  end
endmodule
