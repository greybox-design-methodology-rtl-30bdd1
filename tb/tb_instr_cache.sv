// tb_instr_cache: loads words with a pattern, reads them back by byte
// address and checks both fields and the one-cycle read latency, plus the
// reset value of the output register.
module tb_instr_cache;
  import greybox_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int DEPTH = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic [31:0] pc = 0;
  tagged_instr_t rd, wd;
  logic we = 0;
  logic [$clog2(DEPTH)-1:0] wa = 0;

  always #500 clk = ~clk;

  instr_cache #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .pc(pc), .rd_word(rd),
    .wr_en(we), .wr_addr(wa), .wr_word(wd));

  function automatic tagged_instr_t pattern(input int a);
    tagged_instr_t w;
    w.tcode = tcode_t'((a * 5 + 3) % 8);
    w.instr = 32'hE280_0000 ^ (32'(a) * 32'h0101_0013);
    return w;
  endfunction

  initial begin
    #100;
    checks++;
    if (rd.tcode != 3'd7 || rd.instr != 32'hE1A0_0000) begin
      failures++; $display("FAIL reset word %h", rd);
    end
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; wa = a[$clog2(DEPTH)-1:0]; wd = pattern(a);
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 200; i++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      @(negedge clk); pc = 32'(a) << 2;
      @(posedge clk); #1;
      checks++;
      if (rd !== pattern(a)) begin
        failures++; $display("FAIL addr %0d read %h expected %h", a, rd, pattern(a));
      end
    end
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
