// tb_ecdf_smoothing: checks the smoothing override for corrupted macroblocks.
// All combinations of the corrupted flag and the syntax bS (0..7) are
// applied; a corrupted MB must give bS = 4 with the pixel test forced, a
// correct MB must pass bS through unchanged with no forcing.
// Combinational unit: outputs are sampled 1 ns after the inputs change.
//
// The reference model in this testbench is written independently of the RTL;
// the stimulus and the checked properties are this design's own choices.
`timescale 1ns/1ps
module tb_ecdf_smoothing;
  int checks = 0, failures = 0;
  logic       corrupted, force_filter;
  logic [2:0] bs_in, bs_out;

  ecdf_smoothing dut (.corrupted, .bs_in, .bs_out, .force_filter);

  initial begin
    #1s;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++)
      for (int b = 0; b < 8; b++) begin
        corrupted = 1'(c); bs_in = 3'(b);
        #1;
        checks += 2;
        if (bs_out !== (c ? 3'd4 : 3'(b))) begin
          failures++; $display("FAIL corrupted %0d bs_in %0d: bs_out %0d", c, b, bs_out);
        end
        if (force_filter !== 1'(c)) begin
          failures++; $display("FAIL corrupted %0d: force_filter %0d", c, force_filter);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
