// dbf_bs: boundary strength (bS) of the edge between two 4x4 luma blocks.
//
// Frame coding without MBAFF, one reference list (baseline profile):
//   4  either block intra and the edge is a macroblock edge
//   3  either block intra (internal edge)
//   2  either block has non-zero coefficients
//   1  different reference pictures, or a motion-vector component differing
//      by 4 or more quarter samples
//   0  otherwise
// Combinational. Chroma edges reuse the bS of the corresponding luma edge.
//
// Follows the H.264/AVC bS rules for frame coding with one reference list;
// leaving out field/MBAFF coding and the struct layout of the syntax are this
// design's own choices.
module dbf_bs
  import dbf_pkg::*;
(
  input  logic     mb_edge,
  input  logic     intra_p,
  input  logic     intra_q,
  input  blkinfo_t info_p,
  input  blkinfo_t info_q,
  output logic [2:0] bs
);
  logic signed [12:0] dx, dy;
  always_comb begin
    dx = 13'(info_p.mvx) - 13'(info_q.mvx);
    dy = 13'(info_p.mvy) - 13'(info_q.mvy);
    if ((intra_p || intra_q) && mb_edge)          bs = 3'd4;
    else if (intra_p || intra_q)                  bs = 3'd3;
    else if (info_p.nz || info_q.nz)              bs = 3'd2;
    else if ((info_p.ref_idx != info_q.ref_idx) ||
             (dx >= 4) || (dx <= -4) || (dy >= 4) || (dy <= -4))
                                                  bs = 3'd1;
    else                                          bs = 3'd0;
  end
endmodule
