// ecdf_smoothing: smoothing control of the error-concealed deblocking filter.
//
// In a macroblock flagged as corrupted the filter does not use the syntax
// derived boundary strength: bS is forced to 4 (strong filter, up to three
// pixels changed per side) and filterSampleFlag is forced true, so that every
// edge of the replaced blocks is smoothed. In a correct macroblock bS passes
// unchanged and the pixel test stays active. Combinational.
//
// Forcing bS = 4 and the pixel test true in a corrupted MB follows the
// original architecture; applying it to the MB's left and top edges too is
// this design's own choice.
module ecdf_smoothing (
  input  logic       corrupted,
  input  logic [2:0] bs_in,
  output logic [2:0] bs_out,
  output logic       force_filter
);
  always_comb begin
    bs_out       = corrupted ? 3'd4 : bs_in;
    force_filter = corrupted;
  end
endmodule
