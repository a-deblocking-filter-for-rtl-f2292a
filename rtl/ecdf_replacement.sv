// ecdf_replacement: rebuilds a corrupted 4x4 block by duplication.
//
// Reference pixels: A..D are the right-hand column of the left block (D on
// top, A at the bottom), E the bottom-right pixel of the top-left block,
// F..I the bottom row of the top block and J..M the bottom row of the
// top-right block. The four replacing modes copy them along one direction:
//   vertical:  column j = F+j            horizontal: row i = D, C, B, A
//   diagonal-down-right: row 0 = E F G H, row 1 = D E F G, ... row 3 = B C D E
//   diagonal-down-left:  row 0 = G H I J, row 1 = H I J K, ... row 3 = J K L M
// A missing top-right block repeats I for J..M; a missing top-left block uses
// F (or D without a top block) for E. Without a top block the horizontal
// mode is used, without a left block the vertical one, and with neither the
// block is filled with 128. Combinational; output in CoP words.
//
// Copying neighbour pixels A..M along one of four directions, without
// interpolation, follows the original architecture; the fill values used when
// a neighbour is missing are this design's own choice.
module ecdf_replacement
  import dbf_pkg::*;
(
  input  blk_t       nb [4],     // left, top-left, top, top-right
  input  logic [3:0] avail,
  input  rmode_e     mode,
  output blk_t       blk_out
);
  pix_t   l [4];      // l[i]: left-column pixel of row i (D, C, B, A)
  pix_t   t [8];      // F G H I J K L M
  pix_t   e;
  rmode_e m;
  pix_t   v;
  int     k;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      l[i]   = nb[0][3][8*i +: 8];
      t[i]   = nb[2][i][31:24];
      t[i+4] = avail[3] ? nb[3][i][31:24] : nb[2][3][31:24];
    end
    e = avail[1] ? nb[1][3][31:24] : (avail[2] ? t[0] : l[0]);

    m = mode;
    if (!avail[2]) m = RM_HOR;
    else if (!avail[0] && (m == RM_HOR || m == RM_DDR)) m = RM_VER;

    for (int j = 0; j < 4; j++)
      for (int i = 0; i < 4; i++) begin
        k = j - i;
        unique case (m)
          RM_VER: v = t[j];
          RM_HOR: v = l[i];
          RM_DDR: v = (k > 0) ? t[k-1] : (k == 0) ? e : l[-k-1];
          default: v = t[i+j+1];
        endcase
        if (!avail[0] && !avail[2]) v = 8'd128;
        blk_out[j][8*i +: 8] = v;
      end
  end
endmodule
