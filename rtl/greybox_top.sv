// greybox_top: instruction-driven ultra-dynamic clock system.
//
// The program store holds each instruction together with a 3-bit clock
// control value worked out offline from the instruction's delay bound. The
// pipeline fetches by pc; the fetched word goes out to the pipeline's IF stage
// (instr) and its control value to the clock controller. The controller picks
// how many DCO phases to drop from (or add to) the next cycle; the glitch-less
// multiplexer applies it at the next rising edge of clk_dyn, the pipeline
// clock, or 10 phases into the cycle for a stretch. The ADPLL
// keeps the DCO locked at N times ref_clk. A pipeline flush (pc_recover) makes
// the next few cycles short; dyn_en = 0 gives the fixed PLL period.
//
// The pipeline itself is outside this module: it receives clk_dyn and instr
// and returns pc and pc_recover. Program words are loaded through prog_* on
// clk_dyn.
//
// Structure as in the document's system diagram; widths, sizes and the load
// port are this design's choices.
module greybox_top
  import greybox_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH     = 1024,
  parameter int unsigned DIV_N          = 25,
  parameter int unsigned T_OUT_PS       = T_CLK_PS,
  parameter int unsigned MARGIN_PS      = 0,
  parameter int unsigned RECOVER_CYCLES = 3,
  parameter int unsigned INIT_WORD      = 2400
) (
  input  logic                          ref_clk,
  input  logic                          rst_n,
  input  logic                          dyn_en,
  // pipeline side
  input  logic [31:0]                   pc,
  input  logic                          pc_recover,
  output logic                          clk_dyn,
  output logic [INSTR_W-1:0]            instr,
  // program load
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] prog_addr,
  input  tagged_instr_t                 prog_word,
  // observation
  output phase_sel_t                    phase_sel,
  output logic signed [4:0]             phase_step_n,
  output logic                          recovering,
  output logic [12:0]                   pll_fcw,
  output logic signed [7:0]             pll_phase_err
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [NUM_PHASES-1:0] phases;
  logic                  div_clk;
  tagged_instr_t         fetched;
  phase_sel_t            sel_next;

  adpll #(.DIV_N(DIV_N), .INIT_WORD(INIT_WORD)) u_pll (
    .ref_clk   (ref_clk),
    .rst_n     (rst_n),
    .phases    (phases),
    .div_clk   (div_clk),
    .phase_err (pll_phase_err),
    .fcw       (pll_fcw)
  );

  phase_mux u_mux (
    .phases  (phases),
    .rst_n   (rst_n),
    .sel_req (sel_next),
    .sel_cur (phase_sel),
    .clk_out (clk_dyn)
  );

  instr_cache #(.DEPTH(IMEM_DEPTH)) u_icache (
    .clk     (clk_dyn),
    .rst_n   (rst_n),
    .pc      (pc),
    .rd_word (fetched),
    .wr_en   (prog_we),
    .wr_addr (prog_addr),
    .wr_word (prog_word)
  );

  clk_controller #(
    .T_OUT_PS       (T_OUT_PS),
    .MARGIN_PS      (MARGIN_PS),
    .RECOVER_CYCLES (RECOVER_CYCLES)
  ) u_ctrl (
    .clk        (clk_dyn),
    .rst_n      (rst_n),
    .dyn_en     (dyn_en),
    .tcode      (fetched.tcode),
    .pc_recover (pc_recover),
    .sel_cur    (phase_sel),
    .sel_next   (sel_next),
    .step       (phase_step_n),
    .recovering (recovering)
  );

  assign instr = fetched.instr;
endmodule
