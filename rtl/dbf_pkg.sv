// dbf_pkg: types, constants and look-up tables shared by the error-concealed
// loop/post deblocking filter.
//
// Pixels are 8-bit. Memories and the pixel buffer hold one Column-of-Pixel
// (CoP) word per address: the four pixels of one column of a 4x4 block, byte i
// (bits 8i+7..8i) holding row i, row 0 on top. A 4x4 block is four CoP words,
// word j holding column j. The alpha, beta and tc0 tables are those of
// H.264/AVC (indexA/indexB 0..51); the luma-to-chroma QP map is the H.264 one.
//
// The tables are the H.264/AVC ones the original architecture uses; the line
// operation format and the syntax structs are this design's own choices.
package dbf_pkg;

  typedef logic [7:0]  pix_t;
  typedef logic [31:0] cop_t;
  typedef cop_t        blk_t [4];      // one 4x4 block, four CoP words
  typedef pix_t        line_t [4];     // four pixels of one side of an edge, spatial order

  // Filtering mode of one line of an edge
  typedef enum logic [1:0] {FM_SKIP = 2'd0, FM_WEAK = 2'd1, FM_STRONG = 2'd2} fmode_e;

  // Replacing modes of the error concealment (vertical, horizontal, two diagonals)
  typedef enum logic [1:0] {RM_VER = 2'd0, RM_HOR = 2'd1, RM_DDR = 2'd2, RM_DDL = 2'd3} rmode_e;

  // Colour component
  typedef enum logic [1:0] {C_Y = 2'd0, C_CB = 2'd1, C_CR = 2'd2} comp_e;

  // Syntax information of one 4x4 luma block, used by the boundary strength
  typedef struct packed {
    logic              nz;     // block has non-zero transform coefficients
    logic [3:0]        ref_idx;
    logic signed [11:0] mvx;   // quarter-sample units
    logic signed [11:0] mvy;
  } blkinfo_t;

  // Syntax information of one macroblock, supplied by the syntax parser
  typedef struct packed {
    logic              intra;
    logic [5:0]        qp;
    blkinfo_t [15:0]   blk;    // index = 4*row + column (raster order)
  } mbinfo_t;


  // ------------------------------------------------ control-unit line ops
  // One operation per cycle leaves the control unit for the datapath.
  typedef enum logic [2:0] {
    OP_NOP     = 3'd0,   // bubble
    OP_LOAD_CM = 3'd1,   // content-memory word -> pixel-buffer word
    OP_LOAD_SM = 3'd2,   // slice-memory word   -> pixel-buffer word
    OP_ECLD    = 3'd3,   // slice-memory word   -> EC local buffer word
    OP_REPL    = 3'd4,   // replaced word       -> pixel-buffer word
    OP_STORE   = 3'd5,   // pixel-buffer word   -> frame buffer / slice memory
    OP_FILT    = 3'd6    // one line through the edge filter
  } op_e;

  typedef enum logic [1:0] {D_NONE = 2'd0, D_FRAME = 2'd1, D_SLICE = 2'd2} dst_e;

  typedef struct packed {
    op_e         op;
    logic [1:0]  slot_p;      // P block slot (FILT), source/target slot otherwise
    logic [1:0]  slot_q;
    logic [1:0]  idx;         // word (column) or row index
    logic        vert;        // 1: vertical edge, lines are rows
    logic        p_from_sm;   // P line comes from the slice memory (top neighbour)
    logic        edge_en;     // filtering allowed on this edge
    logic [2:0]  bs;          // boundary strength from the syntax
    logic [5:0]  qp_p;
    logic [5:0]  qp_q;
    logic        chroma;
    dst_e        p_dst;       // extra destination of P' (FILT) or of the word (STORE)
    dst_e        q_dst;
    logic [1:0]  fb_comp;
    logic [11:0] fb_x;
    logic [11:0] fb_y;
    logic [15:0] sm_addr;     // slice-memory write address
    logic        ec_shift;    // shift the EC window before this load
    logic [3:0]  ec_word;     // EC window word (block = ec_word/4)
    logic        ec_b1;       // replacing the second block of the column
    logic [1:0]  ec_left_slot;
    logic [1:0]  ec_tl_slot;
    logic [1:0]  ec_top_slot;
    logic [3:0]  ec_avail;    // left, top-left, top, top-right
    logic        ec_top_row;
  } lineop_t;

  // ---------------------------------------------------------------- tables
  function automatic logic [7:0] alpha_of(input logic [5:0] idx);
    logic [7:0] t [52] = '{
      0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,4,4,5,6,7,8,9,10,12,13,
      15,17,20,22,25,28,32,36,40,45,50,56,63,71,80,90,101,113,127,144,162,182,203,226,255,255};
    return (idx > 6'd51) ? 8'd255 : t[idx];
  endfunction

  function automatic logic [4:0] beta_of(input logic [5:0] idx);
    logic [4:0] t [52] = '{
      0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,2,2,2,3,3,3,3,4,4,4,
      6,6,7,7,8,8,9,9,10,10,11,11,12,12,13,13,14,14,15,15,16,16,17,17,18,18};
    return (idx > 6'd51) ? 5'd18 : t[idx];
  endfunction

  // tc0 for bS = 1, 2, 3 (bS = 4 does not use tc0)
  function automatic logic [4:0] tc0_of(input logic [2:0] bs, input logic [5:0] idx);
    logic [4:0] t1 [52] = '{
      0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,
      1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13};
    logic [4:0] t2 [52] = '{
      0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,1,
      1,1,1,1,1,2,2,2,2,3,3,3,4,4,5,5,6,7,8,8,10,11,12,13,15,17};
    logic [4:0] t3 [52] = '{
      0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,
      1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13,14,16,18,20,23,25};
    logic [5:0] i;
    i = (idx > 6'd51) ? 6'd51 : idx;
    case (bs)
      3'd1:    return t1[i];
      3'd2:    return t2[i];
      3'd3:    return t3[i];
      default: return 5'd0;
    endcase
  endfunction

  // Chroma QP from luma QP (chroma_qp_index_offset = 0)
  function automatic logic [5:0] qpc_of(input logic [5:0] qp);
    logic [5:0] t [22] = '{29,30,31,32,32,33,34,34,35,35,36,36,37,37,37,38,38,38,39,39,39,39};
    if (qp < 6'd30) return qp;
    if (qp > 6'd51) return 6'd39;
    return t[5'(qp - 6'd30)];
  endfunction

  // Pixel helpers on CoP words
  function automatic pix_t cop_pix(input cop_t w, input logic [1:0] row);
    return w[8*row +: 8];
  endfunction

  function automatic pix_t clip1(input logic signed [11:0] v);
    if (v < 0)   return 8'd0;
    if (v > 255) return 8'd255;
    return v[7:0];
  endfunction

endpackage
