// ecdf_top: error-concealed in-loop/post-loop deblocking filter unit.
//
// Filters one macroblock (16x16 luma, two 8x8 chroma, 4:2:0) per command.
// Unfiltered pixels arrive from prediction + residual through a two-bank
// content memory; neighbouring pixels that are not yet final wait in the
// single-port slice memory, so the external frame buffer is only written,
// never read. The control unit runs the hybrid schedule (vertical edge of a
// column, then the horizontal edges of the column before it) over a pixel
// buffer of four 4x4 blocks; one line of up to eight pixels passes the edge
// filter per cycle. Three per-MB options share the same flow and datapath:
//   * loop mode (H.264/AVC in-loop filter, bS from the syntax),
//   * post mode (MPEG-4 style post filter on 8x8 edges, Eq_cnt against the
//     thresholds t2/t3, H.264 strong filter for the strong mode and a
//     shift-only default filter for the weak mode),
//   * corrupted MB (error concealment): each 4x4 block is rebuilt by the edge
//     detection and replacement units from its top and left neighbours before
//     its vertical edge is filtered, and all its edges use bS = 4 with the
//     pixel test forced true.
//
// Interface
//   cm_*      write port of the content memory (prediction side); address is
//             4 x (standard 4x4 block index, luma 0..15, Cb 16..19, Cr 20..23)
//             + column. cm_wr_bank tells which bank is being filled; a
//             command takes the bank filled last and swaps.
//   mb_*      command, accepted when mb_start is high and mb_busy is low;
//             mb_done pulses when the macroblock has been written out.
//   fbp_*/fbq_* two frame-buffer write ports, one 32-bit CoP word each
//             (pixels (x, y..y+3) of component comp, byte i = row y+i).
//   mon_*     observation of the current cycle's decisions (filter mode, Eq_cnt,
//             indexA, replacement mode, edge direction, stall) for statistics.
// Timing: fixed schedule; 380 cycles per correct MB inside the picture, 467
// per corrupted MB, from mb_start to mb_done (a few less on the picture
// border). mb_busy falls in the cycle mb_done is high; a new command can
// be accepted in that same cycle.
//
// From the original architecture: the two-bank 96x32 content memory, the
// single-port slice memory for the top and left neighbours, the four-block
// pixel buffer, the hybrid filtering order, the shared loop/post datapath
// with its Eq_cnt / T2 / T3 decision, and the concealment units (edge
// detection, replacement, bS = 4 smoothing). This design's own choices: the
// two-stage pipeline with a one-cycle stall on a slice-memory clash, the
// slice-memory depth 2N+32 (N = FRAME_WIDTH), the two frame write ports,
// the per-MB t2/t3/offset inputs, the thresholds EQ_THR and GRAD_THR, and
// the mon_* observation ports. The schedule spends separate cycles on block
// loads, stores and the concealment window, so it is slower than the
// 243 cycles/MB the original architecture reaches by overlapping them.
module ecdf_top
  import dbf_pkg::*;
#(
  parameter int unsigned FRAME_WIDTH  = 1920,
  parameter int unsigned FRAME_HEIGHT = 1088,
  parameter int unsigned EQ_THR       = 2,
  parameter int unsigned GRAD_THR     = 128,
  parameter int unsigned SLICE_DEPTH  = 2*FRAME_WIDTH + 32,
  parameter int unsigned SAW          = $clog2(SLICE_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // content memory write port
  input  logic              cm_we,
  input  logic [6:0]        cm_waddr,
  input  logic [31:0]       cm_wdata,
  output logic              cm_wr_bank,
  // macroblock command
  input  logic              mb_start,
  input  logic [7:0]        mb_x,
  input  logic [7:0]        mb_y,
  input  mbinfo_t           cur_info,
  input  mbinfo_t           left_info,
  input  mbinfo_t           top_info,
  input  logic              corrupted,
  input  logic              post_mode,
  input  logic [2:0]        t2,
  input  logic [2:0]        t3,
  input  logic signed [4:0] offset_a,
  input  logic signed [4:0] offset_b,
  output logic              mb_busy,
  output logic              mb_done,
  // frame buffer write ports
  output logic              fbp_we,
  output logic [1:0]        fbp_comp,
  output logic [11:0]       fbp_x,
  output logic [11:0]       fbp_y,
  output logic [31:0]       fbp_data,
  output logic              fbq_we,
  output logic [1:0]        fbq_comp,
  output logic [11:0]       fbq_x,
  output logic [11:0]       fbq_y,
  output logic [31:0]       fbq_data,
  // monitor: decision of the line in the edge filter / replacement this cycle
  output logic              mon_filt,
  output fmode_e            mon_fmode,
  output logic [2:0]        mon_eq_cnt,
  output logic [5:0]        mon_index_a,
  output logic              mon_repl,
  output rmode_e            mon_rmode,
  output logic              mon_real_edge,
  output logic [1:0]        mon_ec_dir,
  output logic              mon_stall
);
  lineop_t           s1;
  logic              mb_corr, mb_post, ctrl_stall;
  logic              cm_swap, cm_rd_en;
  logic [6:0]        cm_rd_addr;
  logic [31:0]       cm_rd_data;
  logic              sm_rd_en, sm_en, sm_we;
  logic [SAW-1:0]    sm_rd_addr, sm_addr;
  logic [31:0]       sm_wdata, sm_rdata;
  logic [2:0]        mb_t2, mb_t3;
  logic signed [4:0] mb_oa, mb_ob;

  // per-MB thresholds latched with the command
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      mb_t2 <= 3'd7; mb_t3 <= 3'd7; mb_oa <= '0; mb_ob <= '0;
    end else if (mb_start && !mb_busy) begin
      mb_t2 <= t2; mb_t3 <= t3; mb_oa <= offset_a; mb_ob <= offset_b;
    end

  dbf_controller #(
    .FRAME_WIDTH(FRAME_WIDTH), .FRAME_HEIGHT(FRAME_HEIGHT), .SAW(SAW)
  ) u_ctrl (
    .clk, .rst_n,
    .start(mb_start), .mb_x, .mb_y, .cur_info, .left_info, .top_info,
    .corrupted, .post_mode, .busy(mb_busy), .done(mb_done),
    .cm_swap, .cm_rd_en, .cm_rd_addr, .sm_rd_en, .sm_rd_addr, .s1,
    .mb_corrupted(mb_corr), .mb_post(mb_post), .stall(ctrl_stall)
  );

  dbf_content_memory #(.DEPTH(96)) u_cm (
    .clk, .rst_n, .swap(cm_swap), .wr_en(cm_we), .wr_addr(cm_waddr), .wr_data(cm_wdata),
    .rd_en(cm_rd_en), .rd_addr(cm_rd_addr), .rd_data(cm_rd_data), .wr_bank(cm_wr_bank)
  );

  dbf_slice_memory #(.DEPTH(SLICE_DEPTH), .AW(SAW)) u_sm (
    .clk, .en(sm_en), .we(sm_we), .addr(sm_addr), .wdata(sm_wdata), .rdata(sm_rdata)
  );

  // ------------------------------------------------------- pixel buffer
  pix_t rp_line [4], rq_line [4], wp_line [4], wq_line [4];
  logic wp_en, wq_en, ww_en;
  cop_t ww_data;
  blk_t blocks [4];

  dbf_pixel_buffer u_pb (
    .clk, .rst_n,
    .rp_slot(s1.slot_p), .rq_slot(s1.slot_q), .rp_idx(s1.idx), .rq_idx(s1.idx),
    .rp_vert(s1.vert), .rq_vert(s1.vert), .rp_line, .rq_line,
    .wp_en, .wq_en, .wp_slot(s1.slot_p), .wq_slot(s1.slot_q), .wp_idx(s1.idx), .wq_idx(s1.idx),
    .wp_vert(s1.vert), .wq_vert(s1.vert), .wp_line, .wq_line,
    .ww_en, .ww_slot(s1.slot_p), .ww_idx(s1.idx), .ww_data, .blocks
  );

  // ------------------------------------------------------- edge filter path
  pix_t       p_line [4];           // spatial order, P side (p3 .. p0)
  pix_t       p [4], q [4], p_o [4], q_o [4];
  logic [2:0] bs_eff, eq_cnt;
  logic       force_f;
  logic [5:0] index_a;
  logic [7:0] alpha;
  logic [4:0] beta, tc0;
  fmode_e     fmode;
  logic       is_filt;

  always_comb begin
    is_filt = (s1.op == OP_FILT);
    for (int i = 0; i < 4; i++)
      p_line[i] = s1.p_from_sm ? sm_rdata[8*i +: 8] : rp_line[i];
    for (int j = 0; j < 4; j++) begin
      p[j] = p_line[3-j];
      q[j] = rq_line[j];
    end
  end

  ecdf_smoothing u_smooth (
    .corrupted(mb_corr), .bs_in(s1.bs), .bs_out(bs_eff), .force_filter(force_f)
  );

  dbf_threshold u_thr (
    .qp_p(s1.qp_p), .qp_q(s1.qp_q), .offset_a(mb_oa), .offset_b(mb_ob), .bs(bs_eff),
    .index_a, .alpha, .beta, .tc0
  );

  dbf_mode_decision #(.EQ_THR(EQ_THR)) u_md (
    .p, .q, .enable(is_filt && s1.edge_en), .post(mb_post), .bs(bs_eff), .alpha, .beta,
    .force_filter(force_f), .t2(mb_t2), .t3(mb_t3), .mode(fmode), .eq_cnt
  );

  dbf_edge_filter u_ef (
    .p, .q, .mode(fmode), .post(mb_post && !mb_corr), .chroma(s1.chroma), .alpha, .beta, .tc0,
    .qp_post(s1.qp_q), .p_out(p_o), .q_out(q_o)
  );

  // ------------------------------------------------------- error concealment
  blk_t   ecbuf [3];
  blk_t   nb [4];
  blk_t   repl;
  rmode_e rmode;
  logic   real_edge;
  logic [1:0] chosen;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 4; j++) ecbuf[i][j] <= '0;
    end else if (s1.op == OP_ECLD) begin
      if (s1.ec_shift) begin
        ecbuf[0] <= ecbuf[1];
        ecbuf[1] <= ecbuf[2];
      end
      ecbuf[s1.ec_word[3:2]][s1.ec_word[1:0]] <= sm_rdata;
    end

  always_comb begin
    nb[0] = blocks[s1.ec_left_slot];
    if (s1.ec_b1) begin
      nb[1] = blocks[s1.ec_tl_slot];
      nb[2] = blocks[s1.ec_top_slot];
      nb[3] = ecbuf[2];
    end else begin
      nb[1] = ecbuf[0];
      nb[2] = ecbuf[1];
      nb[3] = ecbuf[2];
    end
  end

  ecdf_edge_detect #(.GRAD_THR(GRAD_THR)) u_ed (
    .nb, .avail(s1.ec_avail), .top_row(s1.ec_top_row), .mode(rmode), .real_edge, .chosen
  );

  ecdf_replacement u_rep (
    .nb, .avail(s1.ec_avail), .mode(rmode), .blk_out(repl)
  );

  // ------------------------------------------------------- write-back and outputs
  cop_t p_word, q_word, p_old;
  logic sm_wr;

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      wp_line[3-j] = p_o[j];
      wq_line[j]   = q_o[j];
    end
    p_word = {wp_line[3], wp_line[2], wp_line[1], wp_line[0]};
    q_word = {wq_line[3], wq_line[2], wq_line[1], wq_line[0]};
    p_old  = {rp_line[3], rp_line[2], rp_line[1], rp_line[0]};

    wp_en  = is_filt && !s1.p_from_sm;
    wq_en  = is_filt;
    ww_en  = (s1.op == OP_LOAD_CM) || (s1.op == OP_LOAD_SM) || (s1.op == OP_REPL);
    unique case (s1.op)
      OP_LOAD_CM: ww_data = cm_rd_data;
      OP_LOAD_SM: ww_data = sm_rdata;
      default:    ww_data = repl[s1.idx];
    endcase

    fbp_we   = ((s1.op == OP_FILT) || (s1.op == OP_STORE)) && (s1.p_dst == D_FRAME);
    fbp_comp = s1.fb_comp;
    fbp_x    = s1.fb_x;
    fbp_y    = s1.fb_y;
    fbp_data = is_filt ? p_word : p_old;
    fbq_we   = is_filt && (s1.q_dst == D_FRAME);
    fbq_comp = s1.fb_comp;
    fbq_x    = s1.fb_x;
    fbq_y    = s1.fb_y + 12'd4;
    fbq_data = q_word;

    sm_wr    = ((is_filt || s1.op == OP_STORE) && s1.p_dst == D_SLICE) ||
               (is_filt && s1.q_dst == D_SLICE);
    sm_wdata = (s1.op == OP_STORE) ? p_old : ((s1.p_dst == D_SLICE) ? p_word : q_word);
    sm_we    = sm_wr;
    sm_en    = sm_wr || sm_rd_en;
    sm_addr  = sm_wr ? SAW'(s1.sm_addr) : sm_rd_addr;
  end

  assign mon_filt      = is_filt && s1.edge_en;
  assign mon_fmode     = fmode;
  assign mon_eq_cnt    = eq_cnt;
  assign mon_index_a   = index_a;
  assign mon_repl      = (s1.op == OP_REPL);
  assign mon_rmode     = rmode;
  assign mon_real_edge = real_edge;
  assign mon_ec_dir    = chosen;
  assign mon_stall     = ctrl_stall;

  // one slice-memory write per cycle
  a_one_slice_write: assert property (@(posedge clk)
    !(is_filt && s1.p_dst == D_SLICE && s1.q_dst == D_SLICE));
endmodule
