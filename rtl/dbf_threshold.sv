// dbf_threshold: quantizer-dependent thresholds of one edge.
//
// Averages the QPs of the two blocks meeting at the edge, adds the slice
// offsets FilterOffsetA/B and clips to 0..51 (indexA, indexB), then looks up
// alpha (from indexA), beta (from indexB) and tc0 (from indexA and bS, bS 1..3)
// in the H.264/AVC tables held in dbf_pkg. Purely combinational.
// Interface: qp_p/qp_q are the QPs of the P and Q blocks (already mapped to
// chroma QP for chroma edges); offset_a/offset_b are signed slice offsets.
//
// indexA/indexB and the alpha, beta, tc0 tables follow H.264/AVC as the
// original architecture does; chroma_qp_index_offset = 0 is this design's own
// choice.
module dbf_threshold
  import dbf_pkg::*;
(
  input  logic [5:0]        qp_p,
  input  logic [5:0]        qp_q,
  input  logic signed [4:0] offset_a,
  input  logic signed [4:0] offset_b,
  input  logic [2:0]        bs,
  output logic [5:0]        index_a,
  output logic [7:0]        alpha,
  output logic [4:0]        beta,
  output logic [4:0]        tc0
);
  logic [6:0]        qp_av;
  logic signed [8:0] ia, ib;
  logic [5:0]        index_b;

  always_comb begin
    qp_av   = (7'(qp_p) + 7'(qp_q) + 7'd1) >> 1;
    ia      = $signed({2'b00, qp_av}) + 9'(offset_a);
    ib      = $signed({2'b00, qp_av}) + 9'(offset_b);
    index_a = (ia < 0) ? 6'd0 : (ia > 51) ? 6'd51 : ia[5:0];
    index_b = (ib < 0) ? 6'd0 : (ib > 51) ? 6'd51 : ib[5:0];
    alpha   = alpha_of(index_a);
    beta    = beta_of(index_b);
    tc0     = tc0_of(bs, index_a);
  end
endmodule
