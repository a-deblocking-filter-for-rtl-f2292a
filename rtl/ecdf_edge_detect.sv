// ecdf_edge_detect: edge detection of the error-concealed deblocking filter.
//
// For a corrupted 4x4 block, each of the four neighbouring correct (or
// already concealed) 4x4 blocks is examined with the 3x3 Sobel masks
//   Sx = [-1 0 1; -2 0 2; -1 0 1],  Sy = [1 2 1; 0 0 0; -1 -2 -1]
// at its four interior positions; the sums Gx, Gy give the gradient
// magnitude |Gx| + |Gy| and, by ranking the slope Gy/Gx against tan(22.5)
// and tan(67.5) (approximated by 2/5 and 5/2), one of four edge directions,
// i.e. the replacing mode along that edge: vertical, horizontal,
// diagonal-down-right or diagonal-down-left.
// Neighbours: nb[0] left (Direction1), nb[1] top-left (Direction2),
// nb[2] top (Direction3), nb[3] top-right (Direction4).
// A neighbour is a real edge when its magnitude exceeds GRAD_THR. Candidates
// are tried in a priority order set by the block position: in the top block
// row of the macroblock the order is top, top-left, top-right, left;
// elsewhere left, top-left, top-right, top. The first available real edge
// wins; with none, the mode is vertical (horizontal if the top is missing).
// A mode that needs a missing neighbour falls back to vertical or horizontal.
// Combinational.
//
// Sobel gradients on the neighbouring blocks, four replacing directions and
// the top-row priority rule follow the original architecture; |Gx|+|Gy| in
// place of the square root, GRAD_THR = 128, the slope limits 2/5 and 5/2 and
// the order of the middle priorities are this design's own choices.
module ecdf_edge_detect
  import dbf_pkg::*;
#(
  parameter int unsigned GRAD_THR = 128
) (
  input  blk_t       nb [4],
  input  logic [3:0] avail,
  input  logic       top_row,
  output rmode_e     mode,
  output logic       real_edge,
  output logic [1:0] chosen          // neighbour that set the direction
);
  typedef logic signed [13:0] s14_t;

  function automatic s14_t px(input blk_t b, input logic [1:0] r, input logic [1:0] c);
    return s14_t'(b[c][8*r +: 8]);
  endfunction

  s14_t   gx [4], gy [4], ax, ay;
  logic [13:0] mag [4];
  rmode_e dir [4];
  logic   found;
  int     ord [4];
  logic   need_left, need_top;

  always_comb begin
    for (int n = 0; n < 4; n++) begin
      gx[n] = '0; gy[n] = '0;
      for (int i = 1; i <= 2; i++)
        for (int j = 1; j <= 2; j++) begin
          gx[n] += (px(nb[n], 2'(i-1), 2'(j+1)) + 2*px(nb[n], 2'(i), 2'(j+1)) + px(nb[n], 2'(i+1), 2'(j+1)))
                 - (px(nb[n], 2'(i-1), 2'(j-1)) + 2*px(nb[n], 2'(i), 2'(j-1)) + px(nb[n], 2'(i+1), 2'(j-1)));
          gy[n] += (px(nb[n], 2'(i-1), 2'(j-1)) + 2*px(nb[n], 2'(i-1), 2'(j)) + px(nb[n], 2'(i-1), 2'(j+1)))
                 - (px(nb[n], 2'(i+1), 2'(j-1)) + 2*px(nb[n], 2'(i+1), 2'(j)) + px(nb[n], 2'(i+1), 2'(j+1)));
        end
      ax = (gx[n] < 0) ? -gx[n] : gx[n];
      ay = (gy[n] < 0) ? -gy[n] : gy[n];
      mag[n] = 14'(ax + ay);
      if (5*ay < 2*ax)                  dir[n] = RM_VER;   // gradient across: vertical edge
      else if (5*ax < 2*ay)             dir[n] = RM_HOR;
      else if ((gx[n] < 0) == (gy[n] < 0)) dir[n] = RM_DDR;
      else                              dir[n] = RM_DDL;
    end

    if (top_row) begin ord[0] = 2; ord[1] = 1; ord[2] = 3; ord[3] = 0; end
    else         begin ord[0] = 0; ord[1] = 1; ord[2] = 3; ord[3] = 2; end

    found  = 1'b0;
    chosen = 2'd0;
    mode   = avail[2] ? RM_VER : RM_HOR;
    for (int k = 0; k < 4; k++)
      if (!found && avail[ord[k]] && mag[ord[k]] > 14'(GRAD_THR)) begin
        found  = 1'b1;
        chosen = 2'(ord[k]);
        mode   = dir[ord[k]];
      end
    real_edge = found;

    need_left = (mode == RM_HOR) || (mode == RM_DDR);
    need_top  = (mode != RM_HOR);
    if ((need_left && !avail[0]) || (need_top && !avail[2]))
      mode = avail[2] ? RM_VER : RM_HOR;
  end
endmodule
