// tb_ecdf_top_cif: the end-to-end test of tb_ecdf_top on a CIF picture
// (352x288, 22x18 macroblocks), with the top built for that width
// (FRAME_WIDTH = 352, FRAME_HEIGHT = 288). CIF at 30 frames/s on a 50 MHz
// clock is the decoder-chip operating point, leaving 50e6 / (396 x 30) =
// 4209 cycles per MB: every MB, corrupted ones included, must finish within
// that, and correct MBs also within the 408-cycle 1080HD budget.
// All seven pictures of tb_ecdf_top are run once and compared pixel by pixel
// with the same reference model: loop, post and mixed filtering against the
// H.264 order, corrupted MBs against the concealment reference that rebuilds
// blocks in the order the hardware does. Every pixel must be written exactly
// once, and each mechanism (stall, loop weak/strong, post skip/weak/strong,
// the four replacing modes, real edge, loop/post switch, bank overlap, both
// frame ports, corrupted MB) must occur.
//
// The reference model in this testbench is written independently of the RTL;
// the stimulus and the checked properties are this design's own choices.
`timescale 1ns/1ps
module tb_ecdf_top_cif;
  import dbf_pkg::*;

  localparam int W = 352, H = 288, MBW = W/16, MBH = H/16;
  localparam int CW = W/2, CH = H/2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ------------------------------------------------------------------ DUT
  logic              cm_we = 1'b0, cm_wr_bank;
  logic [6:0]        cm_waddr = '0;
  logic [31:0]       cm_wdata = '0;
  logic              mb_start = 1'b0, mb_busy, mb_done;
  logic [7:0]        mb_x = '0, mb_y = '0;
  mbinfo_t           cur_info = '0, left_info = '0, top_info = '0;
  logic              corrupted = 1'b0, post_mode = 1'b0;
  logic [2:0]        t2 = 3'd6, t3 = 3'd3;
  logic signed [4:0] offset_a = '0, offset_b = '0;
  logic              fbp_we, fbq_we;
  logic [1:0]        fbp_comp, fbq_comp;
  logic [11:0]       fbp_x, fbp_y, fbq_x, fbq_y;
  logic [31:0]       fbp_data, fbq_data;
  logic              mon_filt, mon_repl, mon_real_edge, mon_stall;
  fmode_e            mon_fmode;
  rmode_e            mon_rmode;
  logic [2:0]        mon_eq_cnt;
  logic [5:0]        mon_index_a;
  logic [1:0]        mon_ec_dir;

  ecdf_top #(.FRAME_WIDTH(W), .FRAME_HEIGHT(H)) dut (
    .clk, .rst_n, .cm_we, .cm_waddr, .cm_wdata, .cm_wr_bank,
    .mb_start, .mb_x, .mb_y, .cur_info, .left_info, .top_info, .corrupted, .post_mode,
    .t2, .t3, .offset_a, .offset_b, .mb_busy, .mb_done,
    .fbp_we, .fbp_comp, .fbp_x, .fbp_y, .fbp_data,
    .fbq_we, .fbq_comp, .fbq_x, .fbq_y, .fbq_data,
    .mon_filt, .mon_fmode, .mon_eq_cnt, .mon_index_a, .mon_repl, .mon_rmode,
    .mon_real_edge, .mon_ec_dir, .mon_stall
  );

  // watchdog
  initial begin
    #100ms;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // ------------------------------------------------------------ pictures
  int      src [3][H][W];        // unfiltered, comp 0 = Y, 1 = Cb, 2 = Cr (chroma uses [CH][CW])
  int      expd[3][H][W];        // reference result
  int      outp[3][H][W];        // DUT result
  int      wcnt[3][H][W];
  mbinfo_t info [MBH][MBW];
  bit      corr [MBH][MBW], pmod[MBH][MBW];
  int      mt2  [MBH][MBW], mt3[MBH][MBW], moa[MBH][MBW], mob[MBH][MBW];

  function automatic int cw(int c); return (c == 0) ? W : CW; endfunction
  function automatic int ch(int c); return (c == 0) ? H : CH; endfunction

  // ------------------------------------------------------------ reference
  int ALPHA[52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,4,4,5,6,7,8,9,10,12,13,15,17,20,22,25,28,
                    32,36,40,45,50,56,63,71,80,90,101,113,127,144,162,182,203,226,255,255};
  int BETA [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,2,2,2,3,3,3,3,4,4,4,6,6,7,7,8,8,
                    9,9,10,10,11,11,12,12,13,13,14,14,15,15,16,16,17,17,18,18};
  int TC1  [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,
                    1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13};
  int TC2  [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,1,2,
                    2,2,2,3,3,3,4,4,5,5,6,7,8,8,10,11,12,13,15,17};
  int TC3  [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,
                    3,3,4,4,4,5,6,6,7,8,9,10,11,13,14,16,18,20,23,25};
  int QPC  [52] = '{0,1,2,3,4,5,6,7,8,9,10,11,12,13,14,15,16,17,18,19,20,21,22,23,24,25,26,27,28,29,
                    29,30,31,32,32,33,34,34,35,35,36,36,37,37,37,38,38,38,39,39,39,39};

  function automatic int clip3(int lo, int hi, int v);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction
  function automatic int iabs(int v); return (v < 0) ? -v : v; endfunction

  // bS between luma 4x4 blocks (raster index 0..15) of two MBs
  function automatic int ref_bs(mbinfo_t ip, int bp, mbinfo_t iq, int bq, bit mbedge);
    blkinfo_t a, b;
    a = ip.blk[bp]; b = iq.blk[bq];
    if (ip.intra || iq.intra) return mbedge ? 4 : 3;
    if (a.nz || b.nz) return 2;
    if (a.ref_idx != b.ref_idx) return 1;
    if (iabs(int'(a.mvx) - int'(b.mvx)) >= 4 || iabs(int'(a.mvy) - int'(b.mvy)) >= 4) return 1;
    return 0;
  endfunction

  // one line v[0..7] = p3 p2 p1 p0 q0 q1 q2 q3 through the reference filter
  function automatic void ref_line(inout int v[8], input int bs, int ia, int ib, bit chroma,
                                   bit post, int tt2, int tt3, int qpost, bit frc);
    int p0, p1, p2, p3, q0, q1, q2, q3, al, be, ap, aq, tc0, tc, dl, eq;
    int a0, a1, a2, m, a0n, d, lim;
    bit strg;
    p3 = v[0]; p2 = v[1]; p1 = v[2]; p0 = v[3]; q0 = v[4]; q1 = v[5]; q2 = v[6]; q3 = v[7];
    al = ALPHA[ia]; be = BETA[ib];
    ap = iabs(p2 - p0); aq = iabs(q2 - q0);
    if (post) begin
      eq = 0;
      for (int i = 0; i < 7; i++) if (iabs(v[i] - v[i+1]) <= 2) eq++;
      if (eq >= tt2) strg = 1;
      else if (eq >= tt3) begin
        a0 = (2*p1 - 4*p0 + 4*q0 - 2*q1 + 4) >>> 3;
        a1 = (2*p3 - 4*p2 + 4*p1 - 2*p0 + 4) >>> 3;
        a2 = (2*q0 - 4*q1 + 4*q2 - 2*q3 + 4) >>> 3;
        if (iabs(a0) < qpost) begin
          m = iabs(a0);
          if (iabs(a1) < m) m = iabs(a1);
          if (iabs(a2) < m) m = iabs(a2);
          a0n = (a0 < 0) ? -m : m;
          d = (4*(a0n - a0) + 4) >>> 3;
          lim = (p0 - q0) / 2;
          d = (lim >= 0) ? clip3(0, lim, d) : clip3(lim, 0, d);
          v[3] = clip3(0, 255, p0 - d);
          v[4] = clip3(0, 255, q0 + d);
        end
        return;
      end else return;
    end else begin
      if (bs == 0) return;
      if (!frc && !(iabs(p0 - q0) < al && iabs(p1 - p0) < be && iabs(q1 - q0) < be)) return;
      strg = (bs == 4);
      if (!strg) begin
        tc0 = (bs == 1) ? TC1[ia] : (bs == 2) ? TC2[ia] : TC3[ia];
        tc  = chroma ? tc0 + 1 : tc0 + (ap < be) + (aq < be);
        dl  = clip3(-tc, tc, (4*(q0 - p0) + (p1 - q1) + 4) >>> 3);
        v[3] = clip3(0, 255, p0 + dl);
        v[4] = clip3(0, 255, q0 - dl);
        if (!chroma && ap < be) v[2] = p1 + clip3(-tc0, tc0, (p2 + ((p0 + q0 + 1) >>> 1) - 2*p1) >>> 1);
        if (!chroma && aq < be) v[5] = q1 + clip3(-tc0, tc0, (q2 + ((p0 + q0 + 1) >>> 1) - 2*q1) >>> 1);
        return;
      end
    end
    // strong filter
    if (!chroma && ap < be && iabs(p0 - q0) < (al >> 2) + 2) begin
      v[3] = (p2 + 2*p1 + 2*p0 + 2*q0 + q1 + 4) >> 3;
      v[2] = (p2 + p1 + p0 + q0 + 2) >> 2;
      v[1] = (2*p3 + 3*p2 + p1 + p0 + q0 + 4) >> 3;
    end else v[3] = (2*p1 + p0 + q1 + 2) >> 2;
    if (!chroma && aq < be && iabs(p0 - q0) < (al >> 2) + 2) begin
      v[4] = (q2 + 2*q1 + 2*q0 + 2*p0 + p1 + 4) >> 3;
      v[5] = (q2 + q1 + q0 + p0 + 2) >> 2;
      v[6] = (2*q3 + 3*q2 + q1 + q0 + p0 + 4) >> 3;
    end else v[4] = (2*q1 + q0 + p1 + 2) >> 2;
  endfunction

  // filter one edge line in expd[c]: vert edge at column x0 (row y), or
  // horizontal edge at row y0 (column x)
  task automatic edge_line(int c, bit vert, int a, int b, int bs, int qpp, int qpq,
                           int mx, int my);
    int v[8], ia, ib, qa, qp_p, qp_q;
    qp_p = (c == 0) ? qpp : QPC[qpp];
    qp_q = (c == 0) ? qpq : QPC[qpq];
    qa = (qp_p + qp_q + 1) >> 1;
    ia = clip3(0, 51, qa + moa[my][mx]);
    ib = clip3(0, 51, qa + mob[my][mx]);
    for (int i = 0; i < 8; i++) v[i] = vert ? expd[c][b][a - 4 + i] : expd[c][a - 4 + i][b];
    // a corrupted MB uses the loop filter with the pixel test forced true
    ref_line(v, bs, ia, ib, c != 0, pmod[my][mx] && !corr[my][mx], mt2[my][mx], mt3[my][mx],
             qp_q, corr[my][mx]);
    for (int i = 0; i < 8; i++)
      if (vert) expd[c][b][a - 4 + i] = v[i]; else expd[c][a - 4 + i][b] = v[i];
  endtask

  // luma bS of a line: vert edge e (0..3) at luma row r, or horizontal edge e at column r
  function automatic int line_bs(int mx, int my, bit vert, int e, int r);
    if (vert) begin
      if (e == 0) return ref_bs(info[my][mx-1], 4*(r/4) + 3, info[my][mx], 4*(r/4), 1);
      return ref_bs(info[my][mx], 4*(r/4) + e - 1, info[my][mx], 4*(r/4) + e, 0);
    end
    if (e == 0) return ref_bs(info[my-1][mx], 12 + r/4, info[my][mx], r/4, 1);
    return ref_bs(info[my][mx], 4*(e-1) + r/4, info[my][mx], 4*e + r/4, 0);
  endfunction

  task automatic ref_mb(int mx, int my);
    bit pm;
    int qq, qpv, qph;
    pm = pmod[my][mx];
    qq = info[my][mx].qp;
    qpv = (mx > 0) ? int'(info[my][mx-1].qp) : qq;
    qph = (my > 0) ? int'(info[my-1][mx].qp) : qq;
    // luma vertical edges
    for (int e = 0; e < 4; e++) begin
      if (e == 0 && mx == 0) continue;
      if (pm && e[0]) continue;
      for (int r = 0; r < 16; r++)
        edge_line(0, 1, 16*mx + 4*e, 16*my + r, line_bs(mx, my, 1, e, r),
                  (e == 0) ? qpv : qq, qq, mx, my);
    end
    for (int e = 0; e < 4; e++) begin
      if (e == 2) snap_yu1(mx, my);
      if (e == 0 && my == 0) continue;
      if (pm && e[0]) continue;
      for (int r = 0; r < 16; r++)
        edge_line(0, 0, 16*my + 4*e, 16*mx + r, line_bs(mx, my, 0, e, r),
                  (e == 0) ? qph : qq, qq, mx, my);
    end
    for (int c = 1; c < 3; c++) begin
      for (int e = 0; e < 2; e++) begin
        if (e == 0 && mx == 0) continue;
        if (pm && e == 1) continue;
        for (int r = 0; r < 8; r++)
          edge_line(c, 1, 8*mx + 4*e, 8*my + r, line_bs(mx, my, 1, 2*e, 2*r),
                    (e == 0) ? qpv : qq, qq, mx, my);
      end
      for (int e = 0; e < 2; e++) begin
        if (e == 0 && my == 0) continue;
        if (pm && e == 1) continue;
        for (int r = 0; r < 8; r++)
          edge_line(c, 0, 8*my + 4*e, 8*mx + r, line_bs(mx, my, 0, 2*e, 2*r),
                    (e == 0) ? qph : qq, qq, mx, my);
      end
    end
  endtask

  // ------------------------------------------------- concealment reference
  // A corrupted MB is rebuilt block by block in the order the hardware uses
  // (per part: rebuild column k, filter vertical edge k, then the horizontal
  // edges of column k-1), because the neighbours a block is copied from are
  // only partly filtered at that moment. Neighbours come from:
  //   rowsnap  the picture as it was when the MB row started: the row above
  //            the MB (the on-chip copy of it is not touched by the
  //            top-edge filtering of the current row);
  //   yu1      luma block row 1, column 3 of each MB after its upper half
  //            (top-left of the first lower-half block of the next MB);
  //   expd     the current state for everything inside the MB row.
  int rowsnap[3][H][W];
  int yu1[MBH][MBW][4][4];

  task automatic snap_yu1(int mx, int my);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) yu1[my][mx][r][c] = expd[0][16*my + 4 + r][16*mx + 12 + c];
  endtask

  // block at pixel (x0, y0) of component c from the picture state or the row snapshot
  task automatic get_blk(output int b[4][4], input int c, int x0, int y0, bit snap);
    for (int r = 0; r < 4; r++)
      for (int i = 0; i < 4; i++) begin
        int y, x;
        y = y0 + r; x = x0 + i;
        if (y < 0 || x < 0 || y >= ch(c) || x >= cw(c)) b[r][i] = 0;
        else b[r][i] = snap ? rowsnap[c][y][x] : expd[c][y][x];
      end
  endtask

  // edge detection + replacement from the neighbours (left, top-left, top,
  // top-right): Sobel at the 4 interior pixels, |Gx|+|Gy| > 128 is a real
  // edge, slope against 2/5 and 5/2, copy along the direction
  task automatic ref_replace(input int nb[4][4][4], input bit av[4], input bit top_row,
                             output int o[4][4]);
    int gx, gy, ax, ay, mag[4], dir[4], ord[4], m, found, lft[4], top[8], e;
    for (int b = 0; b < 4; b++) begin
      gx = 0; gy = 0;
      for (int r = 1; r <= 2; r++)
        for (int c = 1; c <= 2; c++) begin
          gx += nb[b][r-1][c+1] + 2*nb[b][r][c+1] + nb[b][r+1][c+1]
              - nb[b][r-1][c-1] - 2*nb[b][r][c-1] - nb[b][r+1][c-1];
          gy += nb[b][r-1][c-1] + 2*nb[b][r-1][c] + nb[b][r-1][c+1]
              - nb[b][r+1][c-1] - 2*nb[b][r+1][c] - nb[b][r+1][c+1];
        end
      ax = iabs(gx); ay = iabs(gy);
      mag[b] = ax + ay;
      if (5*ay < 2*ax) dir[b] = 0;
      else if (5*ax < 2*ay) dir[b] = 1;
      else dir[b] = ((gx < 0) == (gy < 0)) ? 2 : 3;
    end
    ord = top_row ? '{2, 1, 3, 0} : '{0, 1, 3, 2};
    m = av[2] ? 0 : 1; found = 0;
    foreach (ord[k])
      if (!found && av[ord[k]] && mag[ord[k]] > 128) begin found = 1; m = dir[ord[k]]; end
    if (!av[2]) m = 1;
    else if (!av[0] && (m == 1 || m == 2)) m = 0;
    for (int i = 0; i < 4; i++) begin
      lft[i] = nb[0][i][3];
      top[i] = nb[2][3][i];
      top[i+4] = av[3] ? nb[3][3][i] : nb[2][3][3];
    end
    e = av[1] ? nb[1][3][3] : av[2] ? top[0] : lft[0];
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        case (m)
          0: o[i][j] = top[j];
          1: o[i][j] = lft[i];
          2: o[i][j] = (j > i) ? top[j-i-1] : (j == i) ? e : lft[i-j-1];
          default: o[i][j] = top[i+j+1];
        endcase
        if (!av[0] && !av[2]) o[i][j] = 128;
      end
  endtask

  // rebuild block row b1 (0 upper, 1 lower) of column k of a part
  task automatic ref_rebuild(int mx, int my, int part, int c, int k, int ncol, bit b1,
                             int x0, int y0);
    int nb[4][4][4], o[4][4], t[4][4];
    bit av[4], top_row, lav, snap;
    lav = (mx > 0);
    if (!b1) begin
      av[0] = lav || k != 0;
      av[2] = (my > 0) || part == 1;
      av[1] = av[2] && (k != 0 || (lav && part != 0));
      av[3] = av[2] && !(k == ncol && (mx == MBW-1 || part == 1));
      top_row = (part != 1);
    end else begin
      av[0] = lav || k != 0; av[1] = av[0]; av[2] = 1; av[3] = 0;
      top_row = 0;
    end
    snap = !b1 && part != 1;
    get_blk(t, c, x0 - 4, y0, 0);      nb[0] = t;
    get_blk(t, c, x0 - 4, y0 - 4, snap); nb[1] = t;
    if (!b1 && part == 1 && k == 0 && lav) nb[1] = yu1[my][mx-1];
    get_blk(t, c, x0, y0 - 4, snap);   nb[2] = t;
    get_blk(t, c, x0 + 4, y0 - 4, snap); nb[3] = t;
    ref_replace(nb, av, top_row, o);
    for (int r = 0; r < 4; r++)
      for (int i = 0; i < 4; i++) expd[c][y0 + r][x0 + i] = o[r][i];
  endtask

  task automatic ref_corr(int mx, int my);
    int qq, qpv, qph;
    qq  = info[my][mx].qp;
    qpv = (mx > 0) ? int'(info[my][mx-1].qp) : qq;
    qph = (my > 0) ? int'(info[my-1][mx].qp) : qq;
    for (int part = 0; part < 4; part++) begin
      int c, ncol, x0, y0;
      c    = (part < 2) ? 0 : part - 1;
      ncol = (part < 2) ? 3 : 1;
      x0   = (c == 0) ? 16*mx : 8*mx;
      y0   = (c == 0) ? 16*my + 8*part : 8*my;
      for (int k = 0; k <= ncol + 1; k++) begin
        if (k <= ncol) begin
          ref_rebuild(mx, my, part, c, k, ncol, 0, x0 + 4*k, y0);
          ref_rebuild(mx, my, part, c, k, ncol, 1, x0 + 4*k, y0 + 4);
          if (k != 0 || mx > 0)
            for (int r = 0; r < 8; r++)
              edge_line(c, 1, x0 + 4*k, y0 + r, 4, (k == 0) ? qpv : qq, qq, mx, my);
        end
        if (k >= 1) begin
          if (my > 0 || part == 1)
            for (int w = 0; w < 4; w++)
              edge_line(c, 0, y0, x0 + 4*(k-1) + w, 4, (part == 1) ? qq : qph, qq, mx, my);
          for (int w = 0; w < 4; w++)
            edge_line(c, 0, y0 + 4, x0 + 4*(k-1) + w, 4, qq, qq, mx, my);
        end
      end
      if (part == 0) snap_yu1(mx, my);
    end
  endtask

  // ------------------------------------------------------------ stimulus
  int pat;                    // picture content type
  function automatic int stripe(int t); return ((t >> 1) & 1) ? 200 : 50; endfunction

  int boff[3][H/4][W/4];       // per-block offsets (blocking artefacts)

  task automatic make_picture(int kind);
    for (int c = 0; c < 3; c++)
      for (int by = 0; by < ch(c)/4; by++)
        for (int bx = 0; bx < cw(c)/4; bx++)
          boff[c][by][bx] = int'($urandom_range(0, 24)) - 12;
    for (int c = 0; c < 3; c++)
      for (int y = 0; y < ch(c); y++)
        for (int x = 0; x < cw(c); x++) begin
          int v, m;
          m = (c == 0) ? 4 * (y/16) + x/16 : 4 * (y/8) + x/8;
          case (kind)
            1, 2, 3: begin
              v = 60 + ((2*x + y) % 128) + c*20 + boff[c][y/4][x/4];
              if ((m % 3) != 0) v += int'($urandom_range(0, 2)) - 1;    // smooth MBs for post
              else v += int'($urandom_range(0, 16)) - 8;
            end
            4: v = (c == 0) ? 77 : (c == 1) ? 90 : 160;
            5: v = $urandom_range(0, 255);
            7: begin
              // per-4x4 random edge direction and phase: every neighbour
              // class (left, top-left, top, top-right) carries real edges
              int d, ph;
              d = boff[c][y/4][x/4] & 3; ph = (boff[c][y/4][x/4] + 12) >> 2;
              case (d)
                0: v = stripe(x + ph);
                1: v = stripe(y + ph);
                2: v = stripe(x + y + ph);
                default: v = stripe(x - y + 64 + ph);
              endcase
            end
            default: begin
              case ((m + c) % 4)
                0: v = stripe(x);
                1: v = stripe(y);
                2: v = stripe(x + y);
                default: v = stripe(x - y + 64);
              endcase
            end
          endcase
          src[c][y][x] = clip3(0, 255, v);
        end
    for (int my = 0; my < MBH; my++)
      for (int mx = 0; mx < MBW; mx++) begin
        mbinfo_t mi;
        mi.intra = ($urandom_range(0, 3) == 0);
        mi.qp    = 6'($urandom_range(18, 51));
        for (int b = 0; b < 16; b++) begin
          mi.blk[b].nz      = ($urandom_range(0, 2) == 0);
          mi.blk[b].ref_idx = 4'($urandom_range(0, 1));
          mi.blk[b].mvx     = 12'(int'($urandom_range(0, 12)) - 6);
          mi.blk[b].mvy     = 12'(int'($urandom_range(0, 12)) - 6);
        end
        info[my][mx] = mi;
        pmod[my][mx] = (kind == 2) || (kind == 3 && $urandom_range(0, 1) == 1);
        corr[my][mx] = (kind == 5) ||
                       (kind == 4 && ((mx == 1 && my == 1) || (mx == 2 && my == 0) ||
                                      (mx == 0 && my == 2) || (mx == 2 && my == 2))) ||
                       (kind == 6 && ((mx + my) % 2 == 1 || (mx == 2 && my == 2))) ||
                       (kind == 7 && ((mx + my) % 2 == 0 || $urandom_range(0, 2) == 0));
        mt2[my][mx] = $urandom_range(5, 7);
        mt3[my][mx] = $urandom_range(2, 4);
        moa[my][mx] = int'($urandom_range(0, 12)) - 6;
        mob[my][mx] = int'($urandom_range(0, 12)) - 6;
        if (kind == 4 || kind == 5) begin
          // garbage inside corrupted MBs
          if (corr[my][mx])
            for (int c = 0; c < 3; c++)
              for (int y = 0; y < 16; y++)
                for (int x = 0; x < 16; x++)
                  if (c == 0 || (x < 8 && y < 8))
                    src[c][(c == 0 ? 16 : 8)*my + y][(c == 0 ? 16 : 8)*mx + x] = $urandom_range(0, 255);
        end
      end
  endtask

  // content-memory word of MB (mx, my): address = 4 x block index + column
  function automatic logic [31:0] cm_word(int mx, int my, int a);
    int blk, col, c, bx, by, x0, y0;
    logic [31:0] w;
    blk = a / 4; col = a % 4;
    if (blk < 16) begin
      c = 0;
      by = 2*(blk / 8) + (blk % 4) / 2;
      bx = 2*((blk % 8) / 4) + blk % 2;
      x0 = 16*mx + 4*bx; y0 = 16*my + 4*by;
    end else begin
      c = (blk < 20) ? 1 : 2;
      by = ((blk - 16) % 4) / 2; bx = (blk - 16) % 2;
      x0 = 8*mx + 4*bx; y0 = 8*my + 4*by;
    end
    for (int i = 0; i < 4; i++) w[8*i +: 8] = 8'(src[c][y0 + i][x0 + col]);
    return w;
  endfunction

  // ------------------------------------------------------------ monitors
  int n_stall, n_loop_weak, n_loop_strong, n_post_skip, n_post_weak, n_post_strong;
  int n_rm[4], n_real_edge, n_switch, n_overlap, n_both_ports, n_corr_mb, n_post_mb;
  bit cur_post;

  always @(posedge clk) if (rst_n) begin
    if (mon_stall) n_stall++;
    if (mon_filt) begin
      if (cur_post) begin
        if (mon_fmode == FM_SKIP) n_post_skip++;
        if (mon_fmode == FM_WEAK) n_post_weak++;
        if (mon_fmode == FM_STRONG) n_post_strong++;
      end else begin
        if (mon_fmode == FM_WEAK) n_loop_weak++;
        if (mon_fmode == FM_STRONG) n_loop_strong++;
      end
    end
    if (mon_repl) begin
      n_rm[mon_rmode]++;
      if (mon_real_edge) n_real_edge++;
    end
    if (cm_we && mb_busy) n_overlap++;
    if (fbp_we && fbq_we) n_both_ports++;
    if (fbp_we) put(fbp_comp, fbp_x, fbp_y, fbp_data);
    if (fbq_we) put(fbq_comp, fbq_x, fbq_y, fbq_data);
  end

  task automatic put(logic [1:0] c, logic [11:0] x, logic [11:0] y, logic [31:0] d);
    int ci, xi, yi;
    ci = c; xi = x; yi = y;
    if (ci > 2 || xi >= cw(ci) || yi + 3 >= ch(ci)) begin
      failures++;
      $display("FAIL write outside picture comp=%0d x=%0d y=%0d", ci, xi, yi);
      return;
    end
    for (int i = 0; i < 4; i++) begin
      outp[ci][yi + i][xi] = d[8*i +: 8];
      wcnt[ci][yi + i][xi]++;
    end
  endtask

  // ------------------------------------------------------------ driver
  int mb_cycles;

  task automatic fill_cm(int mx, int my);
    for (int a = 0; a < 96; a++) begin
      cm_we = 1'b1; cm_waddr = 7'(a); cm_wdata = cm_word(mx, my, a);
      @(posedge clk); #1;
    end
    cm_we = 1'b0;
  endtask

  task automatic run_picture(int kind);
    int t0, prev_post;
    int cyc_int;
    make_picture(kind);
    for (int c = 0; c < 3; c++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          expd[c][y][x] = src[c][y][x]; outp[c][y][x] = -1; wcnt[c][y][x] = 0;
        end
    cyc_int = -1;
    prev_post = -1;
    fill_cm(0, 0);
    for (int my = 0; my < MBH; my++)
      for (int mx = 0; mx < MBW; mx++) begin
        while (mb_busy) begin @(posedge clk); #1; end
        mb_x = 8'(mx); mb_y = 8'(my);
        cur_info  = info[my][mx];
        left_info = (mx > 0) ? info[my][mx-1] : '0;
        top_info  = (my > 0) ? info[my-1][mx] : '0;
        corrupted = corr[my][mx]; post_mode = pmod[my][mx];
        t2 = 3'(mt2[my][mx]); t3 = 3'(mt3[my][mx]);
        offset_a = 5'(moa[my][mx]); offset_b = 5'(mob[my][mx]);
        cur_post = pmod[my][mx] && !corr[my][mx];
        if (prev_post >= 0 && prev_post != int'(cur_post)) n_switch++;
        prev_post = cur_post;
        if (corr[my][mx]) n_corr_mb++;
        if (cur_post) n_post_mb++;
        mb_start = 1'b1;
        @(posedge clk); #1;
        mb_start = 1'b0;
        t0 = $time;
        // next MB's content goes into the other bank while this one runs
        if (mx + 1 < MBW) fill_cm(mx + 1, my);
        else if (my + 1 < MBH) fill_cm(0, my + 1);
        while (!mb_done) begin @(posedge clk); #1; end
        mb_cycles = ($time - t0) / 10 + 1;
        checks++;
        if (mb_cycles > 4209) begin
          failures++;
          $display("FAIL MB (%0d,%0d) took %0d cycles > 4209 (CIF at 30 frames/s, 50 MHz)", mx, my, mb_cycles);
        end
        if (!corr[my][mx]) begin
          checks++;
          if (mb_cycles > 408) begin
            failures++;
            $display("FAIL MB (%0d,%0d) took %0d cycles > 408", mx, my, mb_cycles);
          end
        end
        if (mx > 0 && my > 0 && mx < MBW-1 && my < MBH-1 && !corr[my][mx]) cyc_int = mb_cycles;
        if (mx == 0) rowsnap = expd;
        if (corr[my][mx]) ref_corr(mx, my); else ref_mb(mx, my);
      end
    while (mb_busy) begin @(posedge clk); #1; end
    repeat (4) @(posedge clk);
    #1;
    // compare
    begin
      int bad, badw;
      bad = 0; badw = 0;
      for (int c = 0; c < 3; c++)
        for (int y = 0; y < ch(c); y++)
          for (int x = 0; x < cw(c); x++) begin
            int e;
            checks++;
            if (wcnt[c][y][x] != 1) begin
              failures++; badw++;
              if (badw <= 5) $display("FAIL pic %0d comp %0d (%0d,%0d) written %0d times",
                                      kind, c, x, y, wcnt[c][y][x]);
            end
            e = expd[c][y][x];
            // flat pictures must stay flat whatever was concealed
            if (kind == 4 && e != src[c][0][0]) begin failures++; bad++; end
            if (kind == 5 && e != 128) begin failures++; bad++; end
            checks++;
            if (outp[c][y][x] != e) begin
              failures++; bad++;
              if (bad <= 400) $display("FAIL pic %0d comp %0d (%0d,%0d) got %0d expected %0d",
                                     kind, c, x, y, outp[c][y][x], e);
            end
          end
      $display("picture %0d: %0d pixel mismatches, %0d write-count errors, interior MB %0d cycles",
               kind, bad, badw, cyc_int);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int k = 1; k <= 7; k++) run_picture(k);
    // mechanisms
    begin
      int cnt[15];
      string nm[15] = '{"stall", "loop weak", "loop strong", "post skip", "post weak",
                        "post strong", "VER", "HOR", "DDR", "DDL", "real edge",
                        "loop/post switch", "bank overlap", "both ports", "corrupted MB"};
      cnt = '{n_stall, n_loop_weak, n_loop_strong, n_post_skip, n_post_weak, n_post_strong,
              n_rm[0], n_rm[1], n_rm[2], n_rm[3], n_real_edge, n_switch, n_overlap,
              n_both_ports, n_corr_mb};
      for (int i = 0; i < 15; i++) begin
        checks++;
        $display("mechanism %-16s %0d", nm[i], cnt[i]);
        if (cnt[i] == 0) begin
          failures++;
          $display("FAIL mechanism %s never occurred", nm[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
