// tb_freq_divider: checks the 1/N divider at N = 25 (default) and N = 6.
// Measures, in input cycles, the period and high time of each output and
// compares them with N and floor(N/2).
module tb_freq_divider;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic out25, out6;
  int   cyc = 0;

  always #500 clk = ~clk;
  always @(posedge clk) cyc++;

  freq_divider            dut25 (.clk_in(clk), .rst_n(rst_n), .clk_out(out25));
  freq_divider #(.N(6))   dut6  (.clk_in(clk), .rst_n(rst_n), .clk_out(out6));

  task automatic measure(input int n, ref logic o, input string name);
    int t_rise, t_fall, t_rise2;
    @(posedge o); t_rise = cyc;
    @(negedge o); t_fall = cyc;
    @(posedge o); t_rise2 = cyc;
    checks++;
    if (t_rise2 - t_rise != n) begin
      failures++; $display("FAIL %s period %0d cycles, expected %0d", name, t_rise2 - t_rise, n);
    end
    checks++;
    if (t_fall - t_rise != n / 2) begin
      failures++; $display("FAIL %s high %0d cycles, expected %0d", name, t_fall - t_rise, n / 2);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) measure(25, out25, "N=25");
    repeat (3) measure(6, out6, "N=6");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
