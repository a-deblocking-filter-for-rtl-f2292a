// dbf_content_memory: content memory between prediction and deblocking filter.
//
// Two single-port banks of DEPTH x 32 bits (96 = (16 luma + 8 chroma blocks)
// x 4 CoP words for 4:2:0). The prediction/reconstruction side writes the
// unfiltered macroblock into one bank while the filter reads the other, so
// the decoder runs at macroblock level. swap exchanges the banks (issued when
// the filter starts a new macroblock). Address = 4 x block index + column,
// block index in the standard 4x4 block order (luma 0..15, Cb 16..19,
// Cr 20..23). Reads are synchronous: rd_data is valid the cycle after rd_en.
//
// The two 96x32 banks and the MB-level ping-pong follow the original
// architecture; swapping on the accepted command and the address layout
// (4 x block index + column) are this design's own choices.
module dbf_content_memory #(
  parameter int unsigned DEPTH = 96,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          swap,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [31:0]   wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [31:0]   rd_data,
  output logic          wr_bank        // bank currently written by prediction
);
  logic [31:0] bank0 [DEPTH];
  logic [31:0] bank1 [DEPTH];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    wr_bank <= 1'b0;
    else if (swap) wr_bank <= ~wr_bank;

  // bank 0: written when wr_bank = 0, read otherwise
  always_ff @(posedge clk) begin
    if (!wr_bank && wr_en) bank0[wr_addr] <= wr_data;
    if (wr_bank && wr_en)  bank1[wr_addr] <= wr_data;
    if (rd_en)             rd_data <= wr_bank ? bank0[rd_addr] : bank1[rd_addr];
  end
endmodule
