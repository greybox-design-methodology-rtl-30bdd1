// freq_divider: 1/N feedback divider of the ADPLL.
//
// Counts rising edges of clk_in from 0 to N-1 and drives clk_out high for the
// first N/2 counts (rounded down), so clk_out has period N input cycles and is
// high for floor(N/2) of them. clk_out comes from a register: it changes just
// after a rising edge of clk_in and is free of glitches. Throughout,
// clk_out = (cnt < N/2), so reset (cnt = 0) leaves it high.
//
// The document shows a 1/N divider in the loop and gives no N; N = 25 (30 MHz
// reference for a 750 MHz output) is this design's choice.
module freq_divider #(
  parameter int unsigned N     = 25,
  parameter int unsigned CNT_W = $clog2(N)
) (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      clk_out <= 1'b1;  // matches cnt = 0
    end else begin
      cnt     <= (cnt == CNT_W'(N - 1)) ? '0 : cnt + 1'b1;
      // registered: high while the next count is below N/2
      clk_out <= ((cnt == CNT_W'(N - 1)) ? 0 : int'(cnt) + 1) < int'(N / 2);
    end
  end
endmodule
