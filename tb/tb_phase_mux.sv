// tb_phase_mux: feeds 22 ideal phases (period 1320 ps, 60 ps apart), asks for
// a step n in -10..10 before every rising edge (first each value in turn, then
// at random) and checks that the following cycle lasts 1320 - 60n ps and stays
// high 660 - 60n ps, with no extra edges in between: n > 0 shrinks the cycle,
// n < 0 stretches it.
module tb_phase_mux;
  import greybox_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TD = 60.0;
  localparam real T  = 22 * TD;

  int checks = 0, failures = 0;
  logic [21:0] ph = '0;
  logic rst_n = 1;
  phase_sel_t sel_req, sel_cur;
  logic clk_out;
  int n_next = 0;
  int idx = 0;
  int n_shrink = 0, n_stretch = 0;

  phase_mux dut (.phases(ph), .rst_n(rst_n), .sel_req(sel_req), .sel_cur(sel_cur), .clk_out(clk_out));

  initial begin
    for (int k = 0; k < 22; k++) ph[k] = ((22 - k) % 22) < 11;
    forever begin
      #(TD);
      idx = (idx + 1) % 22;
      for (int k = 0; k < 22; k++) ph[k] = ((idx - k + 22) % 22) < 11;
    end
  end

  always_comb sel_req = phase_sel_t'((int'(sel_cur) + 22 - n_next) % 22);  // n_next in -10..10

  initial begin
    realtime t_rise, t_fall, t_next;
    int n;
    #1 rst_n = 0;
    #10 rst_n = 1;
    @(posedge clk_out);
    for (int i = 0; i < 300; i++) begin
      // step used at this edge is n_next; choose the following one later
      n = n_next;
      t_rise = $realtime;
      @(negedge clk_out); t_fall = $realtime;
      n_next = (i < 21) ? i - 10 : int'($urandom_range(0, 20)) - 10;
      @(posedge clk_out); t_next = $realtime;
      if (n > 0) n_shrink++;
      if (n < 0) n_stretch++;
      checks++;
      if (t_next - t_rise < T - n * TD - 0.01 || t_next - t_rise > T - n * TD + 0.01) begin
        failures++; $display("FAIL n=%0d period %f expected %f", n, t_next - t_rise, T - n * TD);
      end
      checks++;
      if (t_fall - t_rise < T / 2 - n * TD - 0.01 || t_fall - t_rise > T / 2 - n * TD + 0.01) begin
        failures++; $display("FAIL n=%0d high %f expected %f", n, t_fall - t_rise, T / 2 - n * TD);
      end
    end
    checks++;
    if (n_shrink == 0 || n_stretch == 0) begin failures++; $display("FAIL a direction never used"); end
    $display("shrink cycles %0d, stretch cycles %0d", n_shrink, n_stretch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
