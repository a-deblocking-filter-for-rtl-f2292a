// dbf_slice_memory: single-port slice memory of the deblocking filter.
//
// DEPTH x 32-bit CoP words, one access per cycle (read or write), synchronous
// read: rd_data is valid the cycle after a read. It keeps the pixels that are
// not yet completely filtered: the bottom 4x4 block row of the macroblock row
// above (luma N words, Cb N/2, Cr N/2 for a picture N pixels wide) and the
// right-hand block column of the previous macroblock (32 words), so the
// external frame buffer is never read.
//
// A single-port 32-bit memory sized by the frame width follows the original
// architecture; the depth 2N+32 (N = frame width) is this design's own choice,
// sized for a whole column of left-neighbour blocks per component.
module dbf_slice_memory #(
  parameter int unsigned DEPTH = 2*1920 + 32,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);
  logic [31:0] mem [DEPTH];
  always_ff @(posedge clk)
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
endmodule
