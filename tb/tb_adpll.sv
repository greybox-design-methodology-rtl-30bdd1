// tb_adpll: closes the loop with a 30 MHz reference, starting the DCO about
// 9 MHz low (INIT_WORD 2370), and checks that it locks: over the last 100
// reference cycles the phase error stays within +-3 TDC steps (30 ps), the
// average DCO period is 1333.3 ps within 0.5 ps, the 22 phases are T/22 apart
// and the control word settles near 2400 (750 MHz).
module tb_adpll;
  import greybox_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TREF = 1.0e6 / 30.0;
  int checks = 0, failures = 0;
  logic ref_clk = 0, rst_n = 1;
  logic [21:0] ph;
  logic div_clk;
  logic signed [7:0] perr;
  logic [12:0] fcw;

  adpll #(.INIT_WORD(2370)) dut (
    .ref_clk(ref_clk), .rst_n(rst_n), .phases(ph), .div_clk(div_clk), .phase_err(perr), .fcw(fcw));

  initial #1 rst_n = 0;
  initial #10 rst_n = 1;
  initial begin
    #100;
    forever begin
      ref_clk = 1; #(TREF / 2.0);
      ref_clk = 0; #(TREF / 2.0);
    end
  end

  initial begin
    realtime t0, t1, tk;
    int max_err, fcw_min, fcw_max;
    repeat (300) @(posedge ref_clk);
    max_err = 0; fcw_min = 8191; fcw_max = 0;
    for (int i = 0; i < 100; i++) begin
      @(posedge ref_clk); #1;
      if ((perr > 0 ? int'(perr) : -int'(perr)) > max_err) max_err = perr > 0 ? int'(perr) : -int'(perr);
      if (int'(fcw) < fcw_min) fcw_min = int'(fcw);
      if (int'(fcw) > fcw_max) fcw_max = int'(fcw);
    end
    checks++;
    if (max_err > 3) begin failures++; $display("FAIL phase error up to %0d", max_err); end
    checks++;
    if (fcw_min < 2395 || fcw_max > 2405) begin
      failures++; $display("FAIL control word %0d..%0d", fcw_min, fcw_max);
    end
    @(posedge ph[0]); t0 = $realtime;
    for (int k = 1; k < 22; k++) begin
      @(posedge ph[k]); tk = $realtime;
      checks++;
      if (tk - t0 < k * 1333.33 / 22.0 - 1.0 || tk - t0 > k * 1333.33 / 22.0 + 1.0) begin
        failures++; $display("FAIL phase %0d at %f", k, tk - t0);
      end
      @(posedge ph[0]); t0 = $realtime;
    end
    @(posedge ph[0]); t0 = $realtime;
    repeat (250) @(posedge ph[0]);
    t1 = $realtime;
    checks++;
    if ((t1 - t0) / 250.0 < 1332.83 || (t1 - t0) / 250.0 > 1333.83) begin
      failures++; $display("FAIL mean DCO period %f", (t1 - t0) / 250.0);
    end
    $display("locked: |phase error| <= %0d, word %0d..%0d, mean period %f ps", max_err, fcw_min,
             fcw_max, (t1 - t0) / 250.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
