// dbf_pixel_buffer: the four 4x4-block pixel buffer of the deblocking filter.
//
// Four slots, each one 4x4 block held as four 32-bit CoP (column) words in
// registers. Two line read ports (P and Q side of the edge filter) read either
// one CoP word (vert = 0, a column, used for horizontal edges) or one row
// across the four words (vert = 1, used for vertical edges, which needs the
// transposition a column-organised memory cannot give). Two line write ports
// write the filtered lines back in the same orientation, and one word write
// port loads CoP words from the content or slice memory. Reads are
// combinational, writes take effect at the clock edge; on a collision the
// word port wins over Q, Q over P. The whole buffer is also visible as four
// blocks for the error-concealment units.
//
// Four 4x4 register blocks with transposed access follow the original
// architecture; the number and kind of read and write ports are this design's
// own choice.
module dbf_pixel_buffer
  import dbf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // line read ports
  input  logic [1:0] rp_slot, rq_slot,
  input  logic [1:0] rp_idx,  rq_idx,
  input  logic       rp_vert, rq_vert,
  output pix_t       rp_line [4],
  output pix_t       rq_line [4],
  // line write ports
  input  logic       wp_en,   wq_en,
  input  logic [1:0] wp_slot, wq_slot,
  input  logic [1:0] wp_idx,  wq_idx,
  input  logic       wp_vert, wq_vert,
  input  pix_t       wp_line [4],
  input  pix_t       wq_line [4],
  // word write port
  input  logic       ww_en,
  input  logic [1:0] ww_slot,
  input  logic [1:0] ww_idx,
  input  cop_t       ww_data,
  // whole buffer
  output blk_t       blocks [4]
);
  cop_t mem [4][4];

  function automatic void get_line(input cop_t b [4], input logic [1:0] idx,
                                   input logic vert, output pix_t l [4]);
    for (int k = 0; k < 4; k++)
      l[k] = vert ? b[k][8*idx +: 8] : b[idx][8*k +: 8];
  endfunction

  always_comb begin
    get_line(mem[rp_slot], rp_idx, rp_vert, rp_line);
    get_line(mem[rq_slot], rq_idx, rq_vert, rq_line);
    for (int s = 0; s < 4; s++)
      for (int w = 0; w < 4; w++) blocks[s][w] = mem[s][w];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 4; s++)
        for (int w = 0; w < 4; w++) mem[s][w] <= '0;
    end else begin
      if (wp_en)
        for (int k = 0; k < 4; k++)
          if (wp_vert) mem[wp_slot][k][8*wp_idx +: 8] <= wp_line[k];
          else         mem[wp_slot][wp_idx][8*k +: 8] <= wp_line[k];
      if (wq_en)
        for (int k = 0; k < 4; k++)
          if (wq_vert) mem[wq_slot][k][8*wq_idx +: 8] <= wq_line[k];
          else         mem[wq_slot][wq_idx][8*k +: 8] <= wq_line[k];
      if (ww_en) mem[ww_slot][ww_idx] <= ww_data;
    end
  end
endmodule
