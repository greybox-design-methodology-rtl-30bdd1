// tb_clk_controller: drives random control values, PC recover pulses and the
// dyn_en mode, models the multiplexer's selection register, and checks the
// phase step against a hand-computed table for T_out = 1333 ps:
//   bound 0.8 0.9 1.0 1.1 1.2 1.3 ns and T_clk  ->  n = 8 7 5 3 2 0 0 0
// (n = floor((1333 - bound) * 22 / 1333)), the next selection (current - n mod
// 22), and the three-cycle short window after each recover pulse. A second
// instance with the PLL at 1 GHz (T_out = 1000 ps) must give
//   n = 4 2 0 -3 -5 -7 -8 -8
// (negative: stretch by ceil((bound - 1000) * 22 / 1000) phases).
module tb_clk_controller;
  import greybox_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, dyn_en = 1, pc_recover = 0;
  tcode_t tcode = '0;
  phase_sel_t sel_cur, sel_next;
  logic signed [4:0] step, step_f;
  logic recovering, recovering_f;
  phase_sel_t sel_cur_f, sel_next_f;
  int n_stretch = 0;
  localparam int EXP_FAST [8] = '{4, 2, 0, -3, -5, -7, -8, -8};
  int rec_left = 0;
  int n_recover = 0, n_short = 0, n_fixed = 0;
  localparam int EXP_STEP [8] = '{8, 7, 5, 3, 2, 0, 0, 0};

  always #500 clk = ~clk;
  initial #1 rst_n = 0;

  clk_controller dut (
    .clk(clk), .rst_n(rst_n), .dyn_en(dyn_en), .tcode(tcode), .pc_recover(pc_recover),
    .sel_cur(sel_cur), .sel_next(sel_next), .step(step), .recovering(recovering));

  clk_controller #(.T_OUT_PS(1000)) dut_fast (
    .clk(clk), .rst_n(rst_n), .dyn_en(dyn_en), .tcode(tcode), .pc_recover(pc_recover),
    .sel_cur(sel_cur_f), .sel_next(sel_next_f), .step(step_f), .recovering(recovering_f));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sel_cur_f <= '0;
    else        sel_cur_f <= sel_next_f;

  // stands in for the multiplexer's selection register
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sel_cur <= '0;
    else        sel_cur <= sel_next;

  initial begin
    int exp_n, exp_sel;
    bit exp_rec;
    #10 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      tcode      = tcode_t'($urandom_range(0, 7));
      pc_recover = ($urandom_range(0, 19) == 0);
      if (i % 500 == 400) dyn_en = 0;
      if (i % 500 == 450) dyn_en = 1;
      #1;
      exp_rec = pc_recover || (rec_left > 0);
      if (!dyn_en)      exp_n = 0;
      else if (exp_rec) exp_n = EXP_STEP[0];
      else              exp_n = EXP_STEP[tcode];
      exp_sel = (int'(sel_cur) - exp_n + 22) % 22;
      checks++;
      if (int'(step) != exp_n || int'(sel_next) != exp_sel || recovering != exp_rec) begin
        failures++;
        $display("FAIL i=%0d code %0d rec %0d: step %0d sel %0d->%0d expected %0d %0d", i, tcode,
                 exp_rec, step, sel_cur, sel_next, exp_n, exp_sel);
      end
      begin
        int ef, esf;
        ef  = !dyn_en ? 0 : exp_rec ? EXP_FAST[0] : EXP_FAST[tcode];
        esf = (int'(sel_cur_f) - ef + 22) % 22;
        checks++;
        if (int'(step_f) != ef || int'(sel_next_f) != esf || recovering_f != exp_rec) begin
          failures++;
          $display("FAIL fast i=%0d code %0d: step %0d sel %0d->%0d expected %0d %0d", i, tcode,
                   step_f, sel_cur_f, sel_next_f, ef, esf);
        end
        if (ef < 0) n_stretch++;
      end
      if (pc_recover) n_recover++;
      if (exp_rec && dyn_en) n_short++;
      if (!dyn_en) n_fixed++;
      // model of the post-flush window: this cycle and the two after it
      if (pc_recover)        rec_left = 2;
      else if (rec_left > 0) rec_left--;
    end
    checks++;
    if (n_recover == 0 || n_fixed == 0 || n_stretch == 0) begin
      failures++; $display("FAIL mechanisms not exercised");
    end
    $display("recover pulses %0d, short cycles %0d, fixed-clock cycles %0d, stretch steps %0d",
             n_recover, n_short, n_fixed, n_stretch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
