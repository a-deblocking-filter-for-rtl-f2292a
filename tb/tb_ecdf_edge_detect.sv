// tb_ecdf_edge_detect: checks the Sobel edge detection and replacing-mode
// choice of the error concealment.
// Four neighbouring 4x4 blocks (left, top-left, top, top-right) are filled
// with random content, flat content or oriented stripes (vertical,
// horizontal, both diagonals) at random contrast, with random availability
// and block position (top block row or not). The expected mode is computed
// here: 3x3 Sobel sums over the four interior pixels of each block,
// magnitude |Gx| + |Gy| against the threshold 128, direction by comparing
// |Gy|/|Gx| with 2/5 and 5/2 (vertical / horizontal edge, otherwise a
// diagonal: down-right when Gx and Gy have the same sign), neighbours tried
// in the order top, top-left, top-right, left in the top block row and left,
// top-left, top-right, top elsewhere; default vertical (horizontal without a
// top block); a mode whose source pixels are missing falls back to vertical
// or horizontal. Every mode and every chosen neighbour must occur.
// Combinational unit: outputs are sampled 1 ns after the inputs change.
`timescale 1ns/1ps
module tb_ecdf_edge_detect;
  import dbf_pkg::*;
  int checks = 0, failures = 0;
  blk_t       nb [4];
  logic [3:0] avail;
  logic       top_row, real_edge;
  rmode_e     mode;
  logic [1:0] chosen;
  int         pix [4][4][4];        // block, row, column
  int         seen_mode [4], seen_nb [4];

  ecdf_edge_detect #(.GRAD_THR(128)) dut (.nb, .avail, .top_row, .mode, .real_edge, .chosen);

  initial begin
    #1s;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic int iabs(int v); return (v < 0) ? -v : v; endfunction

  initial begin
    repeat (20000) begin
      int gx, gy, mag[4], dir[4], ord[4], em, ech, found, ax, ay;
      for (int b = 0; b < 4; b++) begin
        int kind, lo, hi;
        kind = $urandom_range(0, 5);
        lo = $urandom_range(0, 120); hi = lo + $urandom_range(0, 135);
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++)
            case (kind)
              0: pix[b][r][c] = $urandom_range(0, 255);
              1: pix[b][r][c] = lo;
              2: pix[b][r][c] = (c >= 2) ? hi : lo;
              3: pix[b][r][c] = (r >= 2) ? hi : lo;
              4: pix[b][r][c] = (r + c >= 3) ? hi : lo;
              default: pix[b][r][c] = (c - r >= 0) ? hi : lo;
            endcase
        for (int c = 0; c < 4; c++)
          for (int r = 0; r < 4; r++) nb[b][c][8*r +: 8] = 8'(pix[b][r][c]);
      end
      avail = 4'($urandom); top_row = 1'($urandom);
      #1;
      for (int b = 0; b < 4; b++) begin
        gx = 0; gy = 0;
        for (int r = 1; r <= 2; r++)
          for (int c = 1; c <= 2; c++) begin
            gx += pix[b][r-1][c+1] + 2*pix[b][r][c+1] + pix[b][r+1][c+1]
                - pix[b][r-1][c-1] - 2*pix[b][r][c-1] - pix[b][r+1][c-1];
            gy += pix[b][r-1][c-1] + 2*pix[b][r-1][c] + pix[b][r-1][c+1]
                - pix[b][r+1][c-1] - 2*pix[b][r+1][c] - pix[b][r+1][c+1];
          end
        ax = iabs(gx); ay = iabs(gy);
        mag[b] = ax + ay;
        if (5*ay < 2*ax) dir[b] = 0;
        else if (5*ax < 2*ay) dir[b] = 1;
        else dir[b] = ((gx < 0) == (gy < 0)) ? 2 : 3;
      end
      ord = top_row ? '{2, 1, 3, 0} : '{0, 1, 3, 2};
      em = avail[2] ? 0 : 1; ech = 0; found = 0;
      foreach (ord[k])
        if (!found && avail[ord[k]] && mag[ord[k]] > 128) begin
          found = 1; em = dir[ord[k]]; ech = ord[k];
        end
      if (((em == 1 || em == 2) && !avail[0]) || (em != 1 && !avail[2])) em = avail[2] ? 0 : 1;
      checks += 2;
      if (int'(mode) != em || real_edge != 1'(found)) begin
        failures++;
        $display("FAIL mode %0d/%0d real %0d/%0d avail %b top_row %0d", mode, em, real_edge, found, avail, top_row);
      end
      if (found) begin
        checks++;
        if (int'(chosen) != ech) begin failures++; $display("FAIL chosen %0d expected %0d", chosen, ech); end
        seen_nb[ech]++;
      end
      seen_mode[em]++;
    end
    for (int i = 0; i < 4; i++) begin
      checks += 2;
      if (seen_mode[i] == 0) begin failures++; $display("FAIL mode %0d never chosen", i); end
      if (seen_nb[i] == 0) begin failures++; $display("FAIL neighbour %0d never chosen", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
