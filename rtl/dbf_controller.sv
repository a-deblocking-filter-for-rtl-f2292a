// dbf_controller: control unit of the error-concealed deblocking filter.
//
// Runs the hybrid filtering schedule on one macroblock at a time. The MB is
// processed in four parts: luma upper half (block rows 0-1), luma lower half
// (rows 2-3), Cb and Cr (one part each, 2x2 blocks). Inside a part the
// columns of two blocks are taken left to right; for column k the vertical
// edge k (between column k-1 and k, both rows) is filtered, then the
// horizontal edges of column k-1 (top edge, then the edge between the two
// rows). This is the t1..t8 sequence of the hybrid schedule: every 4x4 block
// sees its left edge first and its lower edge last, which keeps the result
// equal to the standard order (all vertical edges, then all horizontal)
// while each block is loaded into the four-block pixel buffer only once.
//
// Steps of a part and their lengths in cycles (one line or word per cycle):
//   LOADL  8  left-neighbour blocks from the slice memory (skipped at x = 0)
//   LOADC  8  column k from the content memory; in a corrupted MB instead
//   ECLD 12/4 EC window (top-left, top, top-right blocks) from the slice memory
//   REPL 4+4  both blocks of column k rebuilt by the replacement unit
//   V      8  vertical edge k, two blocks x 4 rows
//   STOREL 8  left-neighbour blocks out to the frame buffer / slice memory
//   H      8  horizontal edges of a column, 4 lines each
//   STORER 4  last-column block that has to wait in the slice memory
// Filtered pixels go straight from the edge filter output to the frame
// buffer or the slice memory when they are final for this MB.
//
// Pipeline: stage 0 (this module's sequencer) issues memory reads and builds
// a lineop_t; stage 1 (the datapath around the pixel buffer) executes it the
// next cycle, when the synchronous memory data arrive. The slice memory has
// one port: a stage-0 read that meets a stage-1 write waits one cycle (a
// data-hazard bubble).
//
// Interface: start is accepted while idle (busy = 0) with the MB position,
// the syntax information of the current, left and top MBs and the MB flags;
// done pulses when the last write has left stage 1. cm_swap pulses on start
// so the prediction side can fill the other content-memory bank.
// Slice-memory map (N = FRAME_WIDTH): luma top row 0..N-1, Cb top row
// N..3N/2-1, Cr top row 3N/2..2N-1, left blocks 2N..2N+31. The top-row word
// of the last luma column also carries the MB's block row 1 to its lower
// half, so when the next MB conceals its first upper-half block the
// top-left neighbour is gone and is reported as unavailable.
//
// The hybrid order (vertical edge of a column, then the horizontal edges of
// the column before it) and the block routing follow the original
// architecture; the step lengths, the two-stage pipeline with its stall, the
// slice-memory map and the EC window loads are this design's own choices.
module dbf_controller
  import dbf_pkg::*;
#(
  parameter int unsigned FRAME_WIDTH  = 1920,
  parameter int unsigned FRAME_HEIGHT = 1088,
  parameter int unsigned SAW          = $clog2(2*FRAME_WIDTH + 32)
) (
  input  logic           clk,
  input  logic           rst_n,
  // macroblock command
  input  logic           start,
  input  logic [7:0]     mb_x,
  input  logic [7:0]     mb_y,
  input  mbinfo_t        cur_info,
  input  mbinfo_t        left_info,
  input  mbinfo_t        top_info,
  input  logic           corrupted,
  input  logic           post_mode,
  output logic           busy,
  output logic           done,
  // content memory
  output logic           cm_swap,
  output logic           cm_rd_en,
  output logic [6:0]     cm_rd_addr,
  // slice memory read request (the datapath owns the port)
  output logic           sm_rd_en,
  output logic [SAW-1:0] sm_rd_addr,
  // stage-1 operation
  output lineop_t        s1,
  // latched MB flags for the datapath
  output logic           mb_corrupted,
  output logic           mb_post,
  output logic           stall          // stage 0 held: slice port taken by a write-back
);
  localparam int unsigned MB_COLS = FRAME_WIDTH / 16;
  localparam int unsigned MB_ROWS = FRAME_HEIGHT / 16;
  localparam int unsigned CB_TOP  = FRAME_WIDTH;
  localparam int unsigned CR_TOP  = FRAME_WIDTH + FRAME_WIDTH / 2;
  localparam int unsigned LEFT    = 2 * FRAME_WIDTH;

  typedef enum logic [3:0] {
    ST_IDLE, ST_LOADL, ST_LOADC, ST_ECLD, ST_REPL0, ST_REPL1,
    ST_V, ST_STOREL, ST_H, ST_STORER, ST_DRAIN
  } step_e;

  step_e      step;
  logic [1:0] part;          // 0 luma upper, 1 luma lower, 2 Cb, 3 Cr
  logic [1:0] k;             // column being loaded / vertical edge
  logic [1:0] hc;            // column of the horizontal edges
  logic [3:0] cnt;
  logic [7:0] mx, my;
  mbinfo_t    ci, li, ti;
  logic       corr, post;

  // -------------------------------------------------------------- helpers
  logic       is_chroma, left_av, top_av, right_edge, bottom_edge;
  logic [1:0] ncol;          // last column index in the part
  logic [1:0] r0;            // luma block row of the first row of the part
  logic [3:0] step_len;

  function automatic logic [1:0] base_slot(input logic c0);
    return {c0, 1'b0};
  endfunction

  // standard 4x4 luma block index (content-memory order)
  function automatic logic [4:0] luma_blk(input logic [1:0] r, input logic [1:0] c);
    return {1'b0, r[1], c[1], r[0], c[0]};
  endfunction

  always_comb begin
    is_chroma   = part[1];
    left_av     = (mx != 8'd0);
    top_av      = (my != 8'd0);
    right_edge  = (32'(mx) == MB_COLS - 1);
    bottom_edge = (32'(my) == MB_ROWS - 1);
    ncol        = is_chroma ? 2'd1 : 2'd3;
    r0          = (part == 2'd1) ? 2'd2 : 2'd0;
    unique case (step)
      ST_ECLD:   step_len = (k == 2'd0) ? 4'd11 : 4'd3;
      ST_REPL0, ST_REPL1, ST_STORER: step_len = 4'd3;
      default:   step_len = 4'd7;
    endcase
  end

  // --------------------------------------------------- stage-0 line op
  lineop_t    op0;
  logic       need_sm_rd;
  logic [1:0] b, w;           // block row in the part, word / row index
  logic [1:0] lr;             // luma block row of b
  // info selection for bS
  logic       bs_mb_edge, bs_intra_p, bs_intra_q;
  blkinfo_t   bs_ip, bs_iq;
  logic [2:0] bs_val;
  logic [5:0] qp_p_l, qp_q_l;
  logic [1:0] lrow_p, lrow_q, lcol_p, lcol_q;
  logic       p_left, p_top;
  logic [11:0] bx, by;        // frame position helpers
  lineop_t     op0a;
  logic signed [10:0] wcol;

  dbf_bs u_bs (
    .mb_edge (bs_mb_edge), .intra_p(bs_intra_p), .intra_q(bs_intra_q),
    .info_p  (bs_ip),      .info_q (bs_iq),      .bs     (bs_val)
  );

  function automatic logic [15:0] top_addr(input logic [1:0] prt, input logic [7:0] x,
                                           input logic signed [10:0] c, input logic [1:0] wd);
    int gc;
    if (prt[1]) gc = 2 * int'(x) + int'(c);
    else        gc = 4 * int'(x) + int'(c);
    if (gc < 0) gc = 0;
    unique case (prt)
      2'd2:    return 16'(CB_TOP + 4 * gc + int'(wd));
      2'd3:    return 16'(CR_TOP + 4 * gc + int'(wd));
      default: return 16'(4 * gc + int'(wd));
    endcase
  endfunction

  function automatic logic [15:0] left_addr(input logic [1:0] prt, input logic [1:0] row,
                                            input logic [1:0] wd);
    unique case (prt)
      2'd2:    return 16'(LEFT + 16 + 4 * int'(row) + int'(wd));
      2'd3:    return 16'(LEFT + 24 + 4 * int'(row) + int'(wd));
      default: return 16'(LEFT + 4 * int'(row) + int'(wd));
    endcase
  endfunction

  always_comb begin
    op0a       = '0;
    op0a.op     = OP_NOP;
    op0a.chroma = is_chroma;
    op0a.fb_comp = is_chroma ? ((part == 2'd2) ? 2'(C_CB) : 2'(C_CR)) : 2'(C_Y);
    need_sm_rd = 1'b0;
    sm_rd_addr = '0;
    cm_rd_en   = 1'b0;
    cm_rd_addr = '0;
    b          = 2'(cnt[2]);
    w          = cnt[1:0];
    lr         = r0 + b;
    bx         = is_chroma ? 12'(8 * int'(mx)) : 12'(16 * int'(mx));
    by         = is_chroma ? 12'(8 * int'(my)) : 12'(16 * int'(my));
    wcol       = '0;
    // default bS inputs: vertical edge k of row b
    p_left     = 1'b0;
    p_top      = 1'b0;
    lrow_p     = lr;  lrow_q = lr;
    lcol_p     = k - 2'd1; lcol_q = k;
    bs_mb_edge = 1'b0;

    unique case (step)
      ST_LOADL: begin
        op0a.op     = OP_LOAD_SM;
        op0a.slot_p = 2'd2 + b;
        op0a.idx    = w;
        need_sm_rd = 1'b1;
        sm_rd_addr = SAW'(left_addr(part, (part == 2'd1) ? 2'd2 + b : b, w));
      end
      ST_LOADC: begin
        op0a.op     = OP_LOAD_CM;
        op0a.slot_p = base_slot(k[0]) + b;
        op0a.idx    = w;
        cm_rd_en   = 1'b1;
        if (is_chroma) cm_rd_addr = 7'(4 * ((part == 2'd2 ? 16 : 20) + 2 * int'(b) + int'(k)) + int'(w));
        else           cm_rd_addr = 7'(4 * int'(luma_blk(lr, k)) + int'(w));
      end
      ST_ECLD: begin
        op0a.op       = OP_ECLD;
        op0a.ec_shift = (k != 2'd0) && (cnt == 4'd0);
        op0a.ec_word  = (k == 2'd0) ? cnt : {2'd2, cnt[1:0]};
        wcol         = (k == 2'd0) ? 11'($signed({1'b0, cnt[3:2]})) - 11'sd1 + 11'(k)
                                   : 11'(k) + 11'sd1;
        need_sm_rd   = 1'b1;
        sm_rd_addr   = SAW'(top_addr(part, mx, wcol, cnt[1:0]));
      end
      ST_REPL0, ST_REPL1: begin
        op0a.op           = OP_REPL;
        op0a.ec_b1        = (step == ST_REPL1);
        op0a.slot_p       = base_slot(k[0]) + ((step == ST_REPL1) ? 2'd1 : 2'd0);
        op0a.idx          = cnt[1:0];
        op0a.ec_left_slot = ((k == 2'd0) ? 2'd2 : base_slot(!k[0])) + ((step == ST_REPL1) ? 2'd1 : 2'd0);
        op0a.ec_tl_slot   = (k == 2'd0) ? 2'd2 : base_slot(!k[0]);
        op0a.ec_top_slot  = base_slot(k[0]);
        op0a.ec_top_row   = (step == ST_REPL0) && (part != 2'd1);
        if (step == ST_REPL0) begin
          // window from the slice memory: row above the part
          op0a.ec_avail[0] = left_av || (k != 2'd0);
          op0a.ec_avail[2] = top_av || (part == 2'd1);
          // the word left of the upper luma half holds the left MB's block
          // row 1 by now, so the top-left block is no longer on chip there
          op0a.ec_avail[1] = op0a.ec_avail[2] && (k != 2'd0 || (left_av && part != 2'd0));
          op0a.ec_avail[3] = op0a.ec_avail[2] &&
                            !((k == ncol) && (right_edge || part == 2'd1));
        end else begin
          op0a.ec_avail[0] = left_av || (k != 2'd0);
          op0a.ec_avail[1] = left_av || (k != 2'd0);
          op0a.ec_avail[2] = 1'b1;
          op0a.ec_avail[3] = 1'b0;
        end
      end
      ST_V: begin
        op0a.op      = OP_FILT;
        op0a.vert    = 1'b1;
        op0a.slot_p  = ((k == 2'd0) ? 2'd2 : base_slot(!k[0])) + b;
        op0a.slot_q  = base_slot(k[0]) + b;
        op0a.idx     = w;
        // post mode filters 8x8 edges only
        op0a.edge_en = (k != 2'd0 || left_av) && (!post || corr || (is_chroma ? k == 2'd0 : !k[0]));
        p_left      = (k == 2'd0);
        bs_mb_edge  = (k == 2'd0);
        if (is_chroma) begin
          // chroma row 4b+w maps to luma block row 2b + w/2, luma column 2k
          lrow_p = {b[0], w[1]}; lrow_q = {b[0], w[1]};
          lcol_q = {k[0], 1'b0}; lcol_p = {k[0], 1'b0} - 2'd1;
        end
      end
      ST_STOREL: begin
        op0a.op     = OP_STORE;
        op0a.slot_p = 2'd2 + b;
        op0a.idx    = w;
        op0a.fb_x   = bx - 12'd4 + 12'(w);
        op0a.fb_y   = by + 12'(4 * ((part == 2'd1) ? 2 + int'(b) : int'(b)));
        op0a.p_dst  = D_FRAME;
        if (b == 2'd1 && part != 2'd0 && !bottom_edge) begin
          op0a.p_dst   = D_SLICE;
          op0a.sm_addr = top_addr(part, mx, -11'sd1, w);
        end
      end
      ST_H: begin
        op0a.op     = OP_FILT;
        op0a.vert   = 1'b0;
        op0a.idx    = w;
        op0a.fb_x   = bx + 12'(4 * int'(hc)) + 12'(w);
        lcol_p     = is_chroma ? {hc[0], w[1]} : hc;
        lcol_q     = lcol_p;
        if (cnt[2] == 1'b0) begin
          // e0: top edge of the part; P from the slice memory
          op0a.p_from_sm = 1'b1;
          op0a.slot_q    = base_slot(hc[0]);
          need_sm_rd    = 1'b1;
          sm_rd_addr    = SAW'(top_addr(part, mx, 11'(hc), w));
          op0a.edge_en   = top_av || (part == 2'd1);
          if (part == 2'd1) begin
            // P is block (1,hc), internal edge
            lrow_p = 2'd1; lrow_q = 2'd2;
            op0a.fb_y = by + 12'd4;
            if (hc == ncol && !right_edge) begin
              op0a.p_dst   = D_SLICE;
              op0a.sm_addr = left_addr(part, 2'd1, w);
            end else
              op0a.p_dst = D_FRAME;
          end else begin
            p_top      = 1'b1;
            bs_mb_edge = 1'b1;
            lrow_p     = 2'd3; lrow_q = 2'd0;
            op0a.fb_y   = by - 12'd4;
            op0a.p_dst  = top_av ? D_FRAME : D_NONE;
          end
        end else begin
          // e1: edge between the two rows of the part
          op0a.slot_p  = base_slot(hc[0]);
          op0a.slot_q  = base_slot(hc[0]) + 2'd1;
          op0a.edge_en = !post || corr;
          lrow_p      = is_chroma ? 2'd1 : r0;
          lrow_q      = is_chroma ? 2'd2 : r0 + 2'd1;
          op0a.fb_y    = by + 12'(4 * int'(r0));
          if (hc != ncol || right_edge) begin
            op0a.p_dst = D_FRAME;
            if (part == 2'd0) begin
              op0a.q_dst   = D_SLICE;
              op0a.sm_addr = top_addr(part, mx, 11'(hc), w);
            end else if (bottom_edge) begin
              op0a.q_dst   = D_FRAME;
            end else begin
              op0a.q_dst   = D_SLICE;
              op0a.sm_addr = top_addr(part, mx, 11'(hc), w);
            end
          end else begin
            op0a.p_dst   = D_NONE;  // written by STORER
            op0a.q_dst   = D_SLICE;
            op0a.sm_addr = (part == 2'd0) ? top_addr(part, mx, 11'(hc), w)
                                         : left_addr(part, is_chroma ? 2'd1 : 2'd3, w);
          end
        end
      end
      ST_STORER: begin
        op0a.op      = OP_STORE;
        op0a.slot_p  = base_slot(ncol[0]);
        op0a.idx     = w;
        op0a.p_dst   = D_SLICE;
        op0a.sm_addr = left_addr(part, r0, w);
      end
      default: ;
    endcase

  end

  // ---- bS and QP of the line: P and Q luma blocks
  always_comb begin
    if (p_left) begin
      bs_intra_p = li.intra;
      bs_ip      = li.blk[4 * int'(lrow_p) + 3];
      qp_p_l     = li.qp;
    end else if (p_top) begin
      bs_intra_p = ti.intra;
      bs_ip      = ti.blk[12 + int'(lcol_p)];
      qp_p_l     = ti.qp;
    end else begin
      bs_intra_p = ci.intra;
      bs_ip      = ci.blk[4 * int'(lrow_p) + int'(lcol_p)];
      qp_p_l     = ci.qp;
    end
    bs_intra_q = ci.intra;
    bs_iq      = ci.blk[4 * int'(lrow_q) + int'(lcol_q)];
    qp_q_l     = ci.qp;
  end

  always_comb begin
    op0      = op0a;
    op0.bs   = bs_val;
    op0.qp_p = is_chroma ? qpc_of(qp_p_l) : qp_p_l;
    op0.qp_q = is_chroma ? qpc_of(qp_q_l) : qp_q_l;
    if (op0.op != OP_FILT) op0.edge_en = 1'b0;
    if (op0.op == OP_STORE || op0.op == OP_LOAD_CM || op0.op == OP_LOAD_SM) op0.q_dst = D_NONE;
  end

  // slice-port hazard: stage 1 writing, stage 0 reading
  logic s1_sm_wr;
  assign s1_sm_wr = (s1.op == OP_STORE || s1.op == OP_FILT) &&
                    (s1.p_dst == D_SLICE || s1.q_dst == D_SLICE);
  assign stall    = need_sm_rd && s1_sm_wr;
  assign sm_rd_en = need_sm_rd && !stall && (step != ST_IDLE) && (step != ST_DRAIN);

  // ---------------------------------------------------------- sequencer
  step_e      nstep;
  logic [1:0] nk, nhc, npart;
  logic       finish;

  // step that loads column c
  function automatic step_e load_step(input logic c);
    return c ? ST_ECLD : ST_LOADC;
  endfunction

  always_comb begin
    nstep  = step;
    nk     = k;
    nhc    = hc;
    npart  = part;
    finish = 1'b0;
    unique case (step)
      ST_LOADL:  nstep = load_step(corr);
      ST_LOADC, ST_REPL1: begin
        if (k == 2'd0 && !left_av) begin
          nk = 2'd1; nstep = load_step(corr);
        end else nstep = ST_V;
      end
      ST_ECLD:   nstep = ST_REPL0;
      ST_REPL0:  nstep = ST_REPL1;
      ST_V: begin
        if (k == 2'd0) nstep = ST_STOREL;
        else begin nstep = ST_H; nhc = k - 2'd1; end
      end
      ST_STOREL: begin nk = 2'd1; nstep = load_step(corr); end
      ST_H: begin
        if (hc == ncol) nstep = right_edge ? ST_DRAIN : ST_STORER;
        else if (hc + 2'd1 == ncol) begin nstep = ST_H; nhc = ncol; end
        else begin nk = hc + 2'd2; nstep = load_step(corr); end
      end
      ST_STORER: nstep = ST_DRAIN;
      default: ;
    endcase
    // end of part: next part or finish
    if (nstep == ST_DRAIN) begin
      if (part == 2'd3) finish = 1'b1;
      else begin
        npart = part + 2'd1;
        nk    = 2'd0;
        nstep = left_av ? ST_LOADL : load_step(corr);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step <= ST_IDLE; part <= '0; k <= '0; hc <= '0; cnt <= '0;
      mx <= '0; my <= '0; ci <= '0; li <= '0; ti <= '0; corr <= 1'b0; post <= 1'b0;
      s1 <= '0; done <= 1'b0;
    end else begin
      done    <= 1'b0;
      s1      <= '0;
      if (step == ST_IDLE) begin
        if (start) begin
          mx <= mb_x; my <= mb_y; ci <= cur_info; li <= left_info; ti <= top_info;
          corr <= corrupted; post <= post_mode;
          part <= 2'd0; k <= 2'd0; cnt <= '0;
          step <= (mb_x != 8'd0) ? ST_LOADL : (corrupted ? ST_ECLD : ST_LOADC);
        end
      end else if (step == ST_DRAIN) begin
        // the last operation executes in stage 1 during this cycle
        done <= 1'b1;
        step <= ST_IDLE;
      end else if (!stall) begin
        s1 <= op0;
        if (cnt == step_len) begin
          cnt  <= '0;
          step <= finish ? ST_DRAIN : nstep;
          k    <= nk;
          hc   <= nhc;
          part <= npart;
        end else
          cnt <= cnt + 4'd1;
      end
    end
  end

  assign busy         = (step != ST_IDLE);
  // the bank swaps on the accepting edge, so the first read sees the new bank
  assign cm_swap      = (step == ST_IDLE) && start;
  assign mb_corrupted = corr;
  assign mb_post      = post;

  // the slice port is never asked to read while stage 1 writes
  a_no_port_clash: assert property (@(posedge clk) !(sm_rd_en && s1_sm_wr));
endmodule
