// tb_bound_mix: effective clock frequency for a program whose clock control
// values follow a fixed mix of delay bounds, in the way the speedup of a
// benchmark is measured: speedup = T_clk / mean(period) - 1.
//
// The 1000-word loop (it fits the default 1024-word store) uses the bounds
// 0.8, 0.9, 1.0, 1.1, 1.2, 1.3 ns in the proportions 4, 2, 8, 66, 16, 4 %, a mix
// chosen here so that the mean bound is 1.100 ns, close to the 1.104 ns
// reported for a gcc run. Every period is checked as in tb_greybox_top (the
// wrong-path word fetched after the loop branch is not compared); the
// mean measured period must match the model's mean within 0.1 %, and the
// effective frequency and speedup over the 750 MHz fixed clock are printed.
// Because the phase step is T_out/22 = 60.6 ps, each period is rounded up
// above its bound (848, 909, 1030, 1151, 1212, 1333 ps), so the speedup is
// below what exact 0.1 ns steps would give.
module tb_bound_mix;
  import greybox_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TREF  = 1.0e6 / 30.0;
  localparam real TOUT  = 1.0e6 / 750.0;
  localparam int  PROG  = 1000;
  localparam int  EXP_STEP [8] = '{8, 7, 5, 3, 2, 0, 0, 0};

  int checks = 0, failures = 0;
  logic ref_clk = 0, rst_n = 1, dyn_en = 0;
  logic [31:0] pc = 0;
  logic pc_recover = 0;
  logic clk_dyn;
  logic [31:0] instr;
  logic prog_we = 0;
  logic [9:0] prog_addr = 0;
  real sum_meas = 0.0, sum_exp = 0.0, sum_bound = 0.0;
  int  n_bound = 0, n_dyn = 0;
  tagged_instr_t prog_word = '0;
  phase_sel_t phase_sel;
  logic signed [4:0] step_n;
  logic recovering;
  logic [12:0] fcw;
  logic signed [7:0] perr;

  greybox_top dut (
    .ref_clk(ref_clk), .rst_n(rst_n), .dyn_en(dyn_en), .pc(pc), .pc_recover(pc_recover),
    .clk_dyn(clk_dyn), .instr(instr), .prog_we(prog_we), .prog_addr(prog_addr),
    .prog_word(prog_word), .phase_sel(phase_sel), .phase_step_n(step_n),
    .recovering(recovering), .pll_fcw(fcw), .pll_phase_err(perr));

  initial #1 rst_n = 0;
  initial #10 rst_n = 1;
  initial begin
    #100;
    forever begin
      ref_clk = 1; #(TREF / 2.0);
      ref_clk = 0; #(TREF / 2.0);
    end
  end

  // ---------------- program ----------------
  tagged_instr_t prog [PROG];

  function automatic bit is_branch(input logic [31:0] w);
    return w[27:25] == 3'b101;
  endfunction

  initial begin
    int pct;
    for (int i = 0; i < PROG; i++) begin
      pct = (i * 37) % 100;   // spreads the codes through the loop
      if      (pct < 4)  prog[i].tcode = 3'd0;
      else if (pct < 6)  prog[i].tcode = 3'd1;
      else if (pct < 14) prog[i].tcode = 3'd2;
      else if (pct < 80) prog[i].tcode = 3'd3;
      else if (pct < 96) prog[i].tcode = 3'd4;
      else               prog[i].tcode = 3'd5;
      prog[i].instr = 32'hE080_0000 | (32'(i) << 12) | 32'(i % 16);  // add
    end
    prog[PROG - 1].instr = {4'hE, 4'hA, 24'(0 - (PROG - 1 + 2))};  // b 0
  end

  // ---------------- pipeline front-end model ----------------
  logic run = 0;
  logic [31:0] fetched_addr = 0;   // word address of the word on instr now
  always @(posedge clk_dyn) begin
    if (!run) begin
      pc         <= 0;
      pc_recover <= 0;
    end else if (is_branch(instr) && !pc_recover) begin
      pc         <= (fetched_addr + 2 + {{8{instr[23]}}, instr[23:0]}) << 2;
      pc_recover <= 1;
    end else begin
      pc         <= pc + 4;
      pc_recover <= 0;
    end
    fetched_addr <= pc >> 2;
  end

  // ---------------- period checker ----------------
  int      exp_n = 0;
  int      rec_left = 0;
  realtime t_prev = 0;
  bit      armed = 0;
  int      code_seen [8];
  int      n_recover = 0, n_rec_cycles = 0, n_fixed = 0, n_wrap = 0, n_periods = 0;
  int      n_instr_bad = 0;
  phase_sel_t sel_prev = '0;

  always @(posedge clk_dyn) begin
    realtime t_now;
    real     t_exp;
    bit      rec;
    tcode_t  code;
    t_now = $realtime;
    if (armed) begin
      t_exp = TOUT * real'(22 - exp_n) / 22.0;
      n_periods++;
      if (dyn_en) begin sum_meas += t_now - t_prev; sum_exp += t_exp; n_dyn++; end
      checks++;
      if (t_now - t_prev < t_exp - 3.0 || t_now - t_prev > t_exp + 3.0) begin
        failures++;
        if (failures < 20) $display("FAIL period %f expected %f (n=%0d)", t_now - t_prev, t_exp, exp_n);
      end
    end
    // what the cycle now ending asks of the next one
    code = prog[fetched_addr % PROG].tcode;
    rec  = pc_recover || (rec_left > 0);
    if (!dyn_en)  begin exp_n = 0; if (armed) n_fixed++; end
    else if (rec) begin exp_n = EXP_STEP[0]; if (armed) n_rec_cycles++; end
    else          begin exp_n = EXP_STEP[code]; if (armed) code_seen[code]++;
                        if (armed) begin sum_bound += (code <= 5) ? 800.0 + 100.0 * code : TOUT; n_bound++; end end
    if (armed && pc_recover) n_recover++;
    if (pc_recover)        rec_left = 2;
    else if (rec_left > 0) rec_left--;
    if (armed && phase_sel > sel_prev) n_wrap++;
    sel_prev = phase_sel;
    if (run && armed && fetched_addr < PROG) begin
      checks++;
      if (instr != prog[fetched_addr % PROG].instr) begin
        failures++; n_instr_bad++;
        if (n_instr_bad < 5) $display("FAIL instr %h at word %0d", instr, fetched_addr);
      end
    end
    t_prev = t_now;
  end

  initial begin
    // 1. lock
    repeat (200) @(posedge ref_clk);
    checks++;
    if (fcw < 2395 || fcw > 2405) begin failures++; $display("FAIL PLL word %0d", fcw); end
    // 2. load the program through the write port
    for (int i = 0; i < PROG; i++) begin
      @(negedge clk_dyn);
      prog_we = 1; prog_addr = 10'(i); prog_word = prog[i];
    end
    @(negedge clk_dyn); prog_we = 0;
    // 3. run: dynamic, fixed, dynamic
    @(negedge clk_dyn); run = 1;
    @(negedge clk_dyn); @(negedge clk_dyn);
    armed = 1;
    @(negedge clk_dyn); dyn_en = 1;
    repeat (3000) @(negedge clk_dyn);
    checks++;
    if (sum_meas < sum_exp * 0.999 || sum_meas > sum_exp * 1.001) begin
      failures++; $display("FAIL mean period %f expected %f", sum_meas / n_dyn, sum_exp / n_dyn);
    end
    checks++;
    if (n_recover == 0) begin failures++; $display("FAIL loop branch never flushed"); end
    $display("mean bound %0.1f ps; mean period %0.1f ps; effective %0.1f MHz; speedup over 750 MHz %0.2f %%",
             sum_bound / n_bound, sum_meas / n_dyn, 1.0e6 / (sum_meas / n_dyn),
             100.0 * (TOUT / (sum_meas / n_dyn) - 1.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
