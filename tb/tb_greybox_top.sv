// tb_greybox_top: end-to-end test of the ultra-dynamic clock system at its
// default size (1024-word program store, 30 MHz reference, N = 25).
//
// A small model of the pipeline front end fetches sequentially, follows
// branches (target = address + 2 + signed imm24, in words) and raises
// pc_recover for one cycle after each taken branch. The test
//  1. waits for the PLL to lock with dynamic clocking off,
//  2. loads a 256-word program with random clock control values,
//  3. runs it with dynamic clocking on, then off, then on again,
// and checks every clk_dyn period against T_out*(22-n)/22, where n comes from
// an independent model: the code of the word fetched in the previous cycle
// (table 8 7 5 3 2 0 0 0 for codes 0..7), n = 8 for three cycles from a
// pc_recover pulse, n = 0 with dynamic clocking off. It also checks each
// fetched instruction and counts every mechanism: each code, recover pulses,
// recover-window cycles, fixed-clock cycles and selection wrap-arounds.
module tb_greybox_top;
  import greybox_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TREF  = 1.0e6 / 30.0;
  localparam real TOUT  = 1.0e6 / 750.0;
  localparam int  PROG  = 256;
  localparam int  EXP_STEP [8] = '{8, 7, 5, 3, 2, 0, 0, 0};

  int checks = 0, failures = 0;
  logic ref_clk = 0, rst_n = 1, dyn_en = 0;
  logic [31:0] pc = 0;
  logic pc_recover = 0;
  logic clk_dyn;
  logic [31:0] instr;
  logic prog_we = 0;
  logic [9:0] prog_addr = 0;
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
    for (int i = 0; i < PROG; i++) begin
      prog[i].tcode = tcode_t'($urandom_range(0, 7));
      if (i % 11 == 10) begin
        int tgt, off;
        tgt = (i * 37 + 5) % PROG;
        off = tgt - (i + 2);
        prog[i].instr = {4'hE, 4'hA, 24'(off)};              // b <tgt>
      end else begin
        prog[i].instr = 32'hE080_0000 | (32'(i) << 12) | 32'(i % 16);  // add
      end
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
    else          begin exp_n = EXP_STEP[code]; if (armed) code_seen[code]++; end
    if (armed && pc_recover) n_recover++;
    if (pc_recover)        rec_left = 2;
    else if (rec_left > 0) rec_left--;
    if (armed && phase_sel > sel_prev) n_wrap++;
    sel_prev = phase_sel;
    if (run && armed) begin
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
    repeat (1500) @(negedge clk_dyn);
    dyn_en = 0;
    repeat (300) @(negedge clk_dyn);
    dyn_en = 1;
    repeat (1500) @(negedge clk_dyn);
    // every mechanism must have happened
    for (int c = 0; c < 8; c++) begin
      checks++;
      if (code_seen[c] == 0) begin failures++; $display("FAIL code %0d never used", c); end
    end
    checks++; if (n_recover == 0)    begin failures++; $display("FAIL no pc recover"); end
    checks++; if (n_rec_cycles == 0) begin failures++; $display("FAIL no recover cycles"); end
    checks++; if (n_fixed == 0)      begin failures++; $display("FAIL no fixed-clock cycles"); end
    checks++; if (n_wrap == 0)       begin failures++; $display("FAIL selection never wrapped"); end
    $display("periods %0d; per code %0d %0d %0d %0d %0d %0d %0d %0d; recover pulses %0d, recover cycles %0d, fixed %0d, wraps %0d",
             n_periods, code_seen[0], code_seen[1], code_seen[2], code_seen[3], code_seen[4],
             code_seen[5], code_seen[6], code_seen[7], n_recover, n_rec_cycles, n_fixed, n_wrap);
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
