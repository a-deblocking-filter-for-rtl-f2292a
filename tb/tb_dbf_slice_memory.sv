// tb_dbf_slice_memory: checks the single-port slice memory at its default
// depth (2 x 1920 + 32 words) against an array model: random reads and
// writes, one per cycle, with reads returning the stored word one cycle
// later and holding their output while the port is idle or writing.
// The first and last addresses are always exercised.
//
// The reference model in this testbench is written independently of the RTL;
// the stimulus and the checked properties are this design's own choices.
`timescale 1ns/1ps
module tb_dbf_slice_memory;
  localparam int DEPTH = 2*1920 + 32;
  localparam int AW = $clog2(DEPTH);
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          en = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [31:0]   wdata = '0, rdata, hold;
  logic [31:0]   model [DEPTH];
  bit            valid [DEPTH];

  dbf_slice_memory dut (.clk, .en, .we, .addr, .wdata, .rdata);

  initial begin
    #10ms;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic access(bit w, int a);
    en = 1; we = w; addr = AW'(a); wdata = $urandom;
    if (w) begin model[a] = wdata; valid[a] = 1; end
    @(posedge clk); #1;
    en = 0; we = 0;
    if (!w && valid[a]) begin
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL read @%0d %h expected %h", a, rdata, model[a]); end
      hold = rdata;
      // idle cycle and a write must not change the read data
      @(posedge clk); #1;
      en = 1; we = 1; addr = AW'((a + 1) % DEPTH); wdata = $urandom;
      model[(a + 1) % DEPTH] = wdata; valid[(a + 1) % DEPTH] = 1;
      @(posedge clk); #1;
      en = 0; we = 0;
      checks++;
      if (rdata !== hold) begin failures++; $display("FAIL read data changed while not reading"); end
    end
  endtask

  initial begin
    @(posedge clk); #1;
    access(1, 0); access(1, DEPTH - 1); access(0, 0); access(0, DEPTH - 1);
    for (int a = 0; a < DEPTH; a += 7) access(1, a);
    repeat (6000) access($urandom_range(0, 2) == 0, $urandom_range(0, DEPTH - 1));
    for (int a = 0; a < DEPTH; a += 7) access(0, a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
