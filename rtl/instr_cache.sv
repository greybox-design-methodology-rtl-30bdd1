// instr_cache: program store of the ultra-dynamic clock system.
//
// Holds DEPTH program words. Each word is an ARM instruction with its 3-bit
// clock control value (tagged_instr_t). The pipeline presents its fetch address
// (byte address, word aligned) and the word appears on rd_word one clock later;
// the same word goes to the IF stage and to the clock controller, as in the
// document's system diagram. A write port loads the program.
//
// Timing: synchronous read and write on clk (the dynamic pipeline clock).
// The document only names this block; its size, the separate tag field and
// the absence of any miss handling (it behaves as a tightly coupled memory)
// are choices of this design.
module instr_cache
  import greybox_pkg::*;
#(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // fetch port
  input  logic [31:0]       pc,
  output tagged_instr_t     rd_word,
  // program load port
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  tagged_instr_t     wr_word
);
  timeunit 1ps;
  timeprecision 1fs;

  tagged_instr_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_word;
  end

  // The output register resets to a no-operation word with the longest
  // clock period, so nothing is shortened before the first real fetch.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_word <= '{tcode: 3'd7, instr: 32'hE1A0_0000};  // mov r0, r0
    else        rd_word <= mem[pc[ADDR_W+1:2]];
  end
endmodule
