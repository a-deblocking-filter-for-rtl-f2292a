// dbf_edge_filter: pixel-in pixel-out 1-D edge filter shared by the H.264
// in-loop filter and the modified MPEG-4 post-loop filter.
//
// One line of eight pixels p3..p0 | q0..q3 enters and leaves in one cycle
// (combinational). The mode comes from dbf_mode_decision.
//  * FM_WEAK, loop (post = 0): H.264 normal filter. delta =
//    Clip3(-tc, tc, (4(q0-p0) + (p1-q1) + 4) >> 3); p0 += delta, q0 -= delta;
//    for luma p1/q1 are corrected when ap/aq < beta (clip to tc0).
//  * FM_STRONG: H.264 bS = 4 filter (3/4/5-tap, up to three pixels per side
//    for luma, p0/q0 only for chroma). The post filter uses it in place of
//    the MPEG-4 DC-offset mode.
//  * FM_WEAK, post (post = 1): MPEG-4 default mode with the DCT kernel
//    [2 -5 5 -2] replaced by [2 -4 4 -2]: a0 on (p1 p0 q0 q1), a1 on
//    (p3 p2 p1 p0), a2 on (q0 q1 q2 q3), each rounded by (x + 4) >> 3. When
//    |a0| < qp_post, a0' = sign(a0)*min(|a0|,|a1|,|a2|) and
//    d = (4(a0' - a0) + 4) >> 3, clipped between 0 and (p0 - q0)/2;
//    p0 -= d, q0 += d. The three kernels are evaluated in parallel here.
//  * FM_SKIP: pixels pass unchanged.
//
// The H.264 filters and the post filter's [2 -4 4 -2] kernel with the strong
// mode taken from the bS = 4 filter follow the original architecture; the
// remaining post-filter constants are those of the MPEG-4 deblocking filter,
// and computing the kernels in parallel is this design's own choice.
module dbf_edge_filter
  import dbf_pkg::*;
(
  input  pix_t       p [4],        // p[0] = p0 .. p[3] = p3
  input  pix_t       q [4],
  input  fmode_e     mode,
  input  logic       post,
  input  logic       chroma,
  input  logic [7:0] alpha,
  input  logic [4:0] beta,
  input  logic [4:0] tc0,
  input  logic [5:0] qp_post,
  output pix_t       p_out [4],
  output pix_t       q_out [4]
);
  typedef logic signed [11:0] s12_t;

  function automatic s12_t clip3(input s12_t lo, input s12_t hi, input s12_t v);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction
  function automatic s12_t sabs(input s12_t v);
    return (v < 0) ? -v : v;
  endfunction
  function automatic s12_t kern(input pix_t a, input pix_t b, input pix_t c, input pix_t d);
    // ([2 -4 4 -2] . (a b c d) + 4) >> 3
    s12_t s;
    s = 2*s12_t'(a) - 4*s12_t'(b) + 4*s12_t'(c) - 2*s12_t'(d);
    return (s + 12'sd4) >>> 3;
  endfunction

  s12_t p0, p1, p2, p3, q0, q1, q2, q3;
  s12_t ap, aq, tc, delta, dp1, dq1, beta_s, alpha_s, tc0_s;
  s12_t a0, a1, a2, m, a0n, d, lim;
  logic ap_ok, aq_ok, strong_p, strong_q;

  always_comb begin
    p0 = s12_t'(p[0]); p1 = s12_t'(p[1]); p2 = s12_t'(p[2]); p3 = s12_t'(p[3]);
    q0 = s12_t'(q[0]); q1 = s12_t'(q[1]); q2 = s12_t'(q[2]); q3 = s12_t'(q[3]);
    beta_s  = s12_t'(beta);
    alpha_s = s12_t'(alpha);
    tc0_s   = s12_t'(tc0);
    ap      = sabs(p2 - p0);
    aq      = sabs(q2 - q0);
    ap_ok   = ap < beta_s;
    aq_ok   = aq < beta_s;

    // normal (bS < 4) filter
    tc    = chroma ? tc0_s + 12'sd1 : tc0_s + s12_t'(ap_ok) + s12_t'(aq_ok);
    delta = clip3(-tc, tc, ((((q0 - p0) <<< 2) + (p1 - q1) + 12'sd4) >>> 3));
    dp1   = clip3(-tc0_s, tc0_s, (p2 + ((p0 + q0 + 12'sd1) >>> 1) - (p1 <<< 1)) >>> 1);
    dq1   = clip3(-tc0_s, tc0_s, (q2 + ((p0 + q0 + 12'sd1) >>> 1) - (q1 <<< 1)) >>> 1);

    // strong (bS = 4) filter conditions
    strong_p = !chroma && ap_ok && (sabs(p0 - q0) < ((alpha_s >>> 2) + 12'sd2));
    strong_q = !chroma && aq_ok && (sabs(p0 - q0) < ((alpha_s >>> 2) + 12'sd2));

    // modified post-filter default mode
    a0  = kern(p[1], p[0], q[0], q[1]);
    a1  = kern(p[3], p[2], p[1], p[0]);
    a2  = kern(q[0], q[1], q[2], q[3]);
    m   = sabs(a0);
    if (sabs(a1) < m) m = sabs(a1);
    if (sabs(a2) < m) m = sabs(a2);
    a0n = (a0 < 0) ? -m : m;
    d   = (((a0n - a0) <<< 2) + 12'sd4) >>> 3;
    lim = (p0 - q0) / 12'sd2;
    if (lim >= 0) d = clip3(12'sd0, lim, d);
    else          d = clip3(lim, 12'sd0, d);
    if (!(sabs(a0) < s12_t'(qp_post))) d = 12'sd0;

    p_out = p;
    q_out = q;
    unique case (mode)
      FM_WEAK: begin
        if (post) begin
          p_out[0] = clip1(p0 - d);
          q_out[0] = clip1(q0 + d);
        end else begin
          p_out[0] = clip1(p0 + delta);
          q_out[0] = clip1(q0 - delta);
          if (!chroma && ap_ok) p_out[1] = clip1(p1 + dp1);
          if (!chroma && aq_ok) q_out[1] = clip1(q1 + dq1);
        end
      end
      FM_STRONG: begin
        if (strong_p) begin
          p_out[0] = clip1((p2 + 2*p1 + 2*p0 + 2*q0 + q1 + 12'sd4) >>> 3);
          p_out[1] = clip1((p2 + p1 + p0 + q0 + 12'sd2) >>> 2);
          p_out[2] = clip1((2*p3 + 3*p2 + p1 + p0 + q0 + 12'sd4) >>> 3);
        end else
          p_out[0] = clip1((2*p1 + p0 + q1 + 12'sd2) >>> 2);
        if (strong_q) begin
          q_out[0] = clip1((q2 + 2*q1 + 2*q0 + 2*p0 + p1 + 12'sd4) >>> 3);
          q_out[1] = clip1((q2 + q1 + q0 + p0 + 12'sd2) >>> 2);
          q_out[2] = clip1((2*q3 + 3*q2 + q1 + q0 + p0 + 12'sd4) >>> 3);
        end else
          q_out[0] = clip1((2*q1 + q0 + p1 + 12'sd2) >>> 2);
      end
      default: ;
    endcase
  end
endmodule
