// tb_pi_filter: drives random phase errors and compares word, coarse and fine
// with a reference model written with plain integers (Kp = 1/4, Ki = 1/32,
// 8 fraction bits), including saturation at both ends of the range.
module tb_pi_filter;
  import greybox_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic signed [7:0] err = 0;
  logic [12:0] word;
  logic [5:0]  coarse;
  logic [6:0]  fine;

  always #500 clk = ~clk;

  pi_filter dut (.clk(clk), .rst_n(rst_n), .err(err), .word(word), .coarse(coarse), .fine(fine));

  longint acc_m;  // reference integrator, units of 1/256 fine step
  longint w_m;
  localparam longint WMAX = 6399;

  function automatic longint floor_div(input longint a, input longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && (a < 0)) q = q - 1;
    return q;
  endfunction

  task automatic check_out(input string what);
    checks++;
    if (word != 13'(w_m) || coarse != 6'(w_m / 100) || fine != 7'(w_m % 100)) begin
      failures++;
      $display("FAIL %s word %0d coarse %0d fine %0d expected %0d", what, word, coarse, fine, w_m);
    end
  endtask

  task automatic step(input int e);
    @(negedge clk); err = 8'(e);
    acc_m = acc_m + floor_div(longint'(e) * 256, 32);
    if (acc_m < 0) acc_m = 0;
    if (acc_m > WMAX * 256) acc_m = WMAX * 256;
    w_m = floor_div(acc_m + floor_div(longint'(e) * 256, 4), 256);
    if (w_m < 0) w_m = 0;
    if (w_m > WMAX) w_m = WMAX;
    @(posedge clk); #1;
    check_out("step");
  endtask

  initial begin
    acc_m = 2400 * 256; w_m = 2400;
    #100;
    check_out("reset");
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) step($urandom_range(0, 254) - 127);
    for (int i = 0; i < 3000; i++) step(127);     // drive into the top limit
    for (int i = 0; i < 6000; i++) step(-127);    // and the bottom
    for (int i = 0; i < 100; i++) step($urandom_range(0, 20) - 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
