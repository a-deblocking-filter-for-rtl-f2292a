// tb_dbf_content_memory: checks the two-bank (ping-pong) content memory.
// A producer writes a 96-word macroblock into the write bank while the
// consumer reads the previous macroblock from the other bank; a swap pulse
// exchanges the banks. The testbench keeps the two banks as arrays and checks
// that every read returns, one cycle later, the word of the bank filled last,
// that wr_bank toggles on each swap and that writes never disturb the bank
// being read.
//
// The reference model in this testbench is written independently of the RTL;
// the stimulus and the checked properties are this design's own choices.
`timescale 1ns/1ps
module tb_dbf_content_memory;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        swap = 0, wr_en = 0, rd_en = 0, wr_bank;
  logic [6:0]  wr_addr = '0, rd_addr = '0;
  logic [31:0] wr_data = '0, rd_data;
  logic [31:0] model [2][96];
  int          mbank;

  dbf_content_memory #(.DEPTH(96)) dut (.clk, .rst_n, .swap, .wr_en, .wr_addr, .wr_data,
                                        .rd_en, .rd_addr, .rd_data, .wr_bank);

  initial begin
    #10ms;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [31:0] exp_q;
    bit          exp_v;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    mbank = 0;
    checks++;
    if (wr_bank !== 1'b0) begin failures++; $display("FAIL wr_bank after reset"); end
    // first macroblock: fill only
    for (int a = 0; a < 96; a++) begin
      wr_en = 1; wr_addr = 7'(a); wr_data = $urandom; model[mbank][a] = wr_data;
      @(posedge clk); #1;
    end
    wr_en = 0;
    exp_v = 0;
    for (int mb = 0; mb < 20; mb++) begin
      swap = 1; @(posedge clk); #1; swap = 0;
      mbank ^= 1;
      checks++;
      if (int'(wr_bank) != mbank) begin failures++; $display("FAIL wr_bank %0d expected %0d", wr_bank, mbank); end
      // read all of the last MB in random order while writing the next one
      for (int c = 0; c < 130; c++) begin
        rd_en = ($urandom_range(0, 3) != 0); rd_addr = 7'($urandom_range(0, 95));
        wr_en = (c < 96); wr_addr = 7'(c % 96); wr_data = $urandom;
        if (wr_en) model[mbank][wr_addr] = wr_data;
        @(posedge clk);
        if (exp_v) begin
          checks++;
          if (rd_data !== exp_q) begin failures++; $display("FAIL read %h expected %h", rd_data, exp_q); end
        end
        exp_v = rd_en; exp_q = model[mbank ^ 1][rd_addr];
        #1;
      end
      rd_en = 0; wr_en = 0;
      @(posedge clk);
      if (exp_v) begin
        checks++;
        if (rd_data !== exp_q) begin failures++; $display("FAIL read %h expected %h", rd_data, exp_q); end
      end
      exp_v = 0;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
