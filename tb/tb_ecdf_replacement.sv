// tb_ecdf_replacement: checks the four replacing modes of the error
// concealment against the pixel formulas, written here with the usual
// naming: A..D the left column (rows 0..3, right-most column of the left
// block), E the top-left corner pixel, F..I the bottom row of the top block,
// J..M the bottom row of the top-right block.
//   vertical           pixel (i, j) = top[j]
//   horizontal         pixel (i, j) = left[i]
//   diagonal down-right (j > i) top[j-i-1], (j = i) E, (j < i) left[i-j-1]
//   diagonal down-left  pixel (i, j) = top[i+j+1]
// Missing top-right repeats I; missing top-left uses F (D if the top is also
// missing); no top forces horizontal; no left turns the modes that need it
// into vertical; with neither left nor top every pixel is 128.
// Random content, modes and availability; combinational, sampled after 1 ns.
//
// The reference model in this testbench is written independently of the RTL;
// the stimulus and the checked properties are this design's own choices.
`timescale 1ns/1ps
module tb_ecdf_replacement;
  import dbf_pkg::*;
  int checks = 0, failures = 0;
  blk_t       nb [4], blk_out;
  logic [3:0] avail;
  rmode_e     mode;
  int         seen [4];

  ecdf_replacement dut (.nb, .avail, .mode, .blk_out);

  initial begin
    #1s;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic int px(int b, int r, int c); return nb[b][c][8*r +: 8]; endfunction

  initial begin
    repeat (20000) begin
      int lft[4], top[8], e, m, v;
      for (int b = 0; b < 4; b++) for (int w = 0; w < 4; w++) nb[b][w] = $urandom;
      avail = 4'($urandom);
      mode = rmode_e'($urandom_range(0, 3));
      #1;
      for (int i = 0; i < 4; i++) begin
        lft[i] = px(0, i, 3);
        top[i] = px(2, 3, i);
        top[i+4] = avail[3] ? px(3, 3, i) : px(2, 3, 3);
      end
      e = avail[1] ? px(1, 3, 3) : avail[2] ? top[0] : lft[0];
      m = mode;
      if (!avail[2]) m = 1;
      else if (!avail[0] && (m == 1 || m == 2)) m = 0;
      seen[m]++;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          case (m)
            0: v = top[j];
            1: v = lft[i];
            2: v = (j > i) ? top[j-i-1] : (j == i) ? e : lft[i-j-1];
            default: v = top[i+j+1];
          endcase
          if (!avail[0] && !avail[2]) v = 128;
          checks++;
          if (int'(blk_out[j][8*i +: 8]) != v) begin
            failures++;
            if (failures < 10) $display("FAIL mode %0d avail %b pixel (%0d,%0d): %0d != %0d",
                                        m, avail, i, j, blk_out[j][8*i +: 8], v);
          end
        end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL mode %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
