// tb_tdc: applies a 30 MHz reference and a feedback clock offset by a known
// time, leading and lagging, and checks the code: offset / 10 ps rounded,
// saturated at +-127.
module tb_tdc;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic ref_clk = 0, fb_clk = 0, rst_n = 1;
  logic signed [7:0] err;
  real delta = 0.0;
  localparam real TREF = 33333.333;

  tdc dut (.ref_clk(ref_clk), .fb_clk(fb_clk), .rst_n(rst_n), .err(err));

  initial #1 rst_n = 0;
  initial #10 rst_n = 1;

  // ref rises 2000 ps into each period, fb at 2000 + delta.
  initial begin
    #20;
    forever begin
      fork
        begin #2000.0;         ref_clk = 1; #(TREF / 2.0) ref_clk = 0; end
        begin #(2000.0 + delta); fb_clk = 1; #(TREF / 2.0) fb_clk = 0; end
        begin #(TREF); end
      join
    end
  end

  task automatic check_delta(input real d);
    int exp_code;
    delta = d;
    repeat (3) @(posedge fb_clk);
    #1;
    exp_code = $rtoi((d >= 0.0) ? d / 10.0 + 0.5 : d / 10.0 - 0.5);
    if (exp_code > 127) exp_code = 127;
    if (exp_code < -127) exp_code = -127;
    checks++;
    if (int'(err) != exp_code) begin
      failures++; $display("FAIL delta %f code %0d expected %0d", d, err, exp_code);
    end
  endtask

  initial begin
    check_delta(0.0);
    check_delta(47.0);
    check_delta(-123.0);
    check_delta(300.0);
    check_delta(-960.0);
    check_delta(1500.0);
    check_delta(-1900.0);
    for (int i = 0; i < 20; i++) check_delta(real'($urandom_range(0, 2400)) - 1200.0 + 0.25);
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
