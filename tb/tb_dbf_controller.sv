// tb_dbf_controller: checks the control unit's operation stream on its own,
// for a 64x48 picture (4x3 macroblocks) in four passes: loop mode with
// random syntax, all-intra loop mode, post mode, and a pass with corrupted
// MBs. The stage-1 operations (s1) are observed each cycle; the testbench
// knows nothing of the schedule's order, only what a complete MB must
// produce:
//   * 192 edge-filter lines per MB (luma 4+4 edges x 16 lines, chroma
//     2 x (2+2) edges x 8 lines), 160 at the left picture border where the
//     left MB edge is not issued; enabled are the edges inside the picture
//     (post mode: 8x8 edges only; corrupted: all);
//   * every content-memory word 0..95 read exactly once for a correct MB and
//     none for a corrupted one, from the bank swapped in at the start;
//   * every 4-pixel column word of the picture (luma and chroma) sent to the
//     frame buffer exactly once per pass, nothing outside the picture;
//   * the single slice-memory port never read while stage 1 writes it;
//   * bS: all-intra gives 4 on MB edges and 3 inside, equal zero-motion
//     syntax gives 0; QP of the current MB (chroma: chroma QP) on the q side;
//   * one done pulse per MB, within 408 cycles of the start for a correct MB
//     (1080HD at 30 frames/s on a 100 MHz clock); stalls must occur.
//
// The reference model in this testbench is written independently of the RTL;
// the stimulus and the checked properties are this design's own choices.
`timescale 1ns/1ps
module tb_dbf_controller;
  import dbf_pkg::*;
  localparam int W = 64, H = 48, MBW = W/16, MBH = H/16;
  localparam int SAW = $clog2(2*W + 32);
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           start = 0, corrupted = 0, post_mode = 0;
  logic [7:0]     mb_x = '0, mb_y = '0;
  mbinfo_t        cur_info = '0, left_info = '0, top_info = '0;
  logic           busy, done, cm_swap, cm_rd_en, sm_rd_en, mb_corrupted, mb_post, stall;
  logic [6:0]     cm_rd_addr;
  logic [SAW-1:0] sm_rd_addr;
  lineop_t        s1;

  dbf_controller #(.FRAME_WIDTH(W), .FRAME_HEIGHT(H), .SAW(SAW)) dut (
    .clk, .rst_n, .start, .mb_x, .mb_y, .cur_info, .left_info, .top_info, .corrupted, .post_mode,
    .busy, .done, .cm_swap, .cm_rd_en, .cm_rd_addr, .sm_rd_en, .sm_rd_addr, .s1,
    .mb_corrupted, .mb_post, .stall);

  initial begin
    #20ms;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic int qpc(int q);
    int t[22] = '{29,30,31,32,32,33,34,34,35,35,36,36,37,37,37,38,38,38,39,39,39,39};
    return (q < 30) ? q : t[q - 30];
  endfunction

  task automatic fail(string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endtask

  // ----------------------------------------------------------- monitor
  int n_filt, n_en, n_cm, n_done, n_swap, n_stall, n_bs4, n_bs3, n_bsx, n_qp_bad;
  int cm_seen [96];
  int fb_words [3][H][W];
  int pass_kind;
  int cur_qp;

  task automatic fb_mark(int c, int x, int y);
    checks++;
    if (c > 2 || x >= ((c == 0) ? W : W/2) || y + 3 >= ((c == 0) ? H : H/2) || y % 4 != 0) begin
      fail($sformatf("frame write outside picture c=%0d x=%0d y=%0d", c, x, y));
      return;
    end
    fb_words[c][y][x]++;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (stall) n_stall++;
    if (done) n_done++;
    if (cm_swap) n_swap++;
    if (cm_rd_en) begin n_cm++; cm_seen[cm_rd_addr]++; end
    // one port: no read while stage 1 writes
    if (sm_rd_en && ((s1.op == OP_FILT && (s1.p_dst == D_SLICE || s1.q_dst == D_SLICE)) ||
                     (s1.op == OP_STORE && s1.p_dst == D_SLICE))) begin
      checks++;
      fail("slice memory read and write in one cycle");
    end
    if (s1.op == OP_FILT) begin
      n_filt++;
      if (s1.edge_en) begin
        n_en++;
        if (s1.bs == 3'd4) n_bs4++;
        else if (s1.bs == 3'd3) n_bs3++;
        else if (s1.bs != 3'd0) n_bsx++;
        if (int'(s1.qp_q) != (s1.chroma ? qpc(cur_qp) : cur_qp)) n_qp_bad++;
      end
      if (s1.p_dst == D_FRAME) fb_mark(s1.fb_comp, s1.fb_x, s1.fb_y);
      if (s1.q_dst == D_FRAME) fb_mark(s1.fb_comp, s1.fb_x, s1.fb_y + 4);
    end
    if (s1.op == OP_STORE && s1.p_dst == D_FRAME) fb_mark(s1.fb_comp, s1.fb_x, s1.fb_y);
  end

  // ----------------------------------------------------------- driver
  task automatic run_pass(int kind);
    mbinfo_t info [MBH][MBW];
    pass_kind = kind;
    for (int c = 0; c < 3; c++) for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) fb_words[c][y][x] = 0;
    for (int my = 0; my < MBH; my++)
      for (int mx = 0; mx < MBW; mx++) begin
        mbinfo_t mi;
        mi = '0;
        mi.qp = 6'($urandom_range(0, 51));
        mi.intra = (kind == 1) || (kind == 0 && $urandom_range(0, 3) == 0);
        if (kind == 0)
          for (int b = 0; b < 16; b++) begin
            mi.blk[b].nz = 1'($urandom); mi.blk[b].mvx = 12'($urandom_range(0, 8));
          end
        info[my][mx] = mi;
      end
    for (int my = 0; my < MBH; my++)
      for (int mx = 0; mx < MBW; mx++) begin
        int t0, cyc, ex_en, corr_mb, lv, lh, cv, ch;
        corr_mb = (kind == 3) && ((mx + my) % 2 == 0);
        n_filt = 0; n_en = 0; n_cm = 0; n_done = 0; n_swap = 0; n_bs4 = 0; n_bs3 = 0; n_bsx = 0;
        n_qp_bad = 0;
        foreach (cm_seen[i]) cm_seen[i] = 0;
        cur_qp = info[my][mx].qp;
        mb_x = 8'(mx); mb_y = 8'(my); cur_info = info[my][mx];
        left_info = (mx > 0) ? info[my][mx-1] : '0;
        top_info  = (my > 0) ? info[my-1][mx] : '0;
        corrupted = 1'(corr_mb); post_mode = (kind == 2);
        start = 1;
        @(posedge clk); #1;
        start = 0;
        t0 = $time;
        while (!done) begin
          @(posedge clk); #1;
          if ($time - t0 > 5000) break;
        end
        cyc = ($time - t0) / 10 + 1;
        repeat (2) @(posedge clk);
        #1;
        // expected enabled lines
        if (kind == 2 && !corr_mb) begin
          lv = (mx > 0) ? 2 : 1; lh = (my > 0) ? 2 : 1; cv = (mx > 0) ? 1 : 0; ch = (my > 0) ? 1 : 0;
        end else begin
          lv = (mx > 0) ? 4 : 3; lh = (my > 0) ? 4 : 3; cv = (mx > 0) ? 2 : 1; ch = (my > 0) ? 2 : 1;
        end
        ex_en = 16 * (lv + lh) + 16 * (cv + ch);
        checks += 6;
        if (n_done != 1) fail($sformatf("MB %0d,%0d: %0d done pulses", mx, my, n_done));
        if (n_swap != 1) fail($sformatf("MB %0d,%0d: %0d bank swaps", mx, my, n_swap));
        if (n_filt != ((mx > 0) ? 192 : 160)) fail($sformatf("MB %0d,%0d: %0d filter lines", mx, my, n_filt));
        if (n_en != ex_en) fail($sformatf("MB %0d,%0d kind %0d: %0d enabled lines, expected %0d", mx, my, kind, n_en, ex_en));
        if (n_qp_bad != 0) fail($sformatf("MB %0d,%0d: %0d lines with a wrong QP", mx, my, n_qp_bad));
        if (!corr_mb && cyc > 408) fail($sformatf("MB %0d,%0d: %0d cycles", mx, my, cyc));
        if (mx == 1 && my == 1) $display("pass %0d: MB (1,1) %0d cycles", kind, cyc);
        for (int a = 0; a < 96; a++) begin
          checks++;
          if (cm_seen[a] != (corr_mb ? 0 : 1)) fail($sformatf("MB %0d,%0d: content word %0d read %0d times", mx, my, a, cm_seen[a]));
        end
        if (kind == 1) begin
          int mbe;
          mbe = ((mx > 0) ? 32 : 0) + ((my > 0) ? 32 : 0);
          checks += 2;
          if (n_bs4 != mbe) fail($sformatf("MB %0d,%0d intra: %0d bS=4 lines, expected %0d", mx, my, n_bs4, mbe));
          if (n_bs3 != n_en - mbe) fail($sformatf("MB %0d,%0d intra: %0d bS=3 lines", mx, my, n_bs3));
        end
        if (kind == 2) begin
          checks++;
          if (n_bs4 + n_bs3 + n_bsx != 0) fail($sformatf("MB %0d,%0d equal syntax: non-zero bS", mx, my));
        end
      end
    for (int c = 0; c < 3; c++)
      for (int y = 0; y < ((c == 0) ? H : H/2); y += 4)
        for (int x = 0; x < ((c == 0) ? W : W/2); x++) begin
          checks++;
          if (fb_words[c][y][x] != 1) fail($sformatf("pass %0d: word c=%0d x=%0d y=%0d written %0d times",
                                                     kind, c, x, y, fb_words[c][y][x]));
        end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int k = 0; k < 4; k++) run_pass(k);
    checks++;
    if (n_stall == 0) fail("no stall occurred");
    $display("stalls %0d", n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
