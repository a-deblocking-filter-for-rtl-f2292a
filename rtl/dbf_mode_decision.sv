// dbf_mode_decision: skip / weak / strong decision for one line of an edge.
//
// Loop (H.264) mode: a line is filtered when bS != 0 and filterSampleFlag
// holds (|p0-q0| < alpha, |p1-p0| < beta, |q1-q0| < beta); bS = 4 selects the
// strong filter, bS 1..3 the normal (weak) one. force_filter (corrupted
// macroblock) makes filterSampleFlag true.
// Post (MPEG-4 style) mode: Eq_cnt counts the neighbouring pixel pairs among
// the eight pixels p3..q3 whose difference is at most EQ_THR (0..7).
// Eq_cnt >= t2 selects the strong filter, t3 <= Eq_cnt < t2 the weak
// (modified default) filter, and anything below t3 skips the line. t2 and t3
// come from the syntax parser. A corrupted macroblock always uses loop mode.
// enable = 0 skips the line (edge not filtered in this mode or picture edge).
// Combinational.
//
// The bS / alpha / beta test and the Eq_cnt decision against T2 and T3 follow
// the original architecture; counting 7 pairs over p3..q3 with the pair
// threshold EQ_THR = 2 is this design's own choice.
module dbf_mode_decision
  import dbf_pkg::*;
#(
  parameter int unsigned EQ_THR = 2
) (
  input  pix_t       p [4],     // p[0] = p0 (next to the edge) .. p[3] = p3
  input  pix_t       q [4],
  input  logic       enable,
  input  logic       post,
  input  logic [2:0] bs,
  input  logic [7:0] alpha,
  input  logic [4:0] beta,
  input  logic       force_filter,
  input  logic [2:0] t2,
  input  logic [2:0] t3,
  output fmode_e     mode,
  output logic [2:0] eq_cnt
);
  function automatic logic [8:0] absd(input pix_t a, input pix_t b);
    return (a > b) ? 9'(a - b) : 9'(b - a);
  endfunction

  pix_t v [8];
  logic sample_flag;

  always_comb begin
    v[0] = p[3]; v[1] = p[2]; v[2] = p[1]; v[3] = p[0];
    v[4] = q[0]; v[5] = q[1]; v[6] = q[2]; v[7] = q[3];
    eq_cnt = 3'd0;
    for (int i = 0; i < 7; i++)
      if (absd(v[i], v[i+1]) <= 9'(EQ_THR)) eq_cnt = eq_cnt + 3'd1;

    sample_flag = force_filter ||
                  ((absd(p[0], q[0]) < 9'(alpha)) &&
                   (absd(p[1], p[0]) < 9'(beta))  &&
                   (absd(q[1], q[0]) < 9'(beta)));

    mode = FM_SKIP;
    if (!enable)                          mode = FM_SKIP;
    else if (post && !force_filter) begin
      if (eq_cnt >= t2)                   mode = FM_STRONG;
      else if (eq_cnt >= t3)              mode = FM_WEAK;
    end else if (bs != 3'd0 && sample_flag)
      mode = (bs == 3'd4) ? FM_STRONG : FM_WEAK;
  end
endmodule
