// weight_lut: weight look-up table indexed by the rule book's kernel index.
//
// Sparse convolution applies the same kernel offset to many input/output pairs.
// Instead of duplicating weights per rule, each rule carries only an 8-bit kernel
// index that is shared by all channels, and this table maps that index to the
// full PE_ROWS x PE_COLS weight matrix of the offset (input channel x output
// channel). One read delivers all 100 weights for the PE array.
// The host writes one row (one input channel, PE_COLS weights) per cycle.
// Timing: rd_en/rd_kidx in cycle t, rd_w valid from t+1 and held.
// The index-addressed sharing follows the architecture; the depth of 128 offsets
// (81 needed for a 3x3x3x3 4D kernel, 125 for a 5x5x5 3D kernel) is this
// design's choice.
module weight_lut
  import scnn_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned RW   = $clog2(PE_ROWS)
)(
  input  logic                       clk,
  input  logic                       wr_en,
  input  logic [AW-1:0]              wr_kidx,
  input  logic [RW-1:0]              wr_row,
  input  data_t [PE_COLS-1:0]        wr_data,
  input  logic                       rd_en,
  input  logic [AW-1:0]              rd_kidx,
  output wmat_t                      rd_w
);

  wmat_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_kidx][wr_row] <= wr_data;
    if (rd_en) rd_w <= mem[rd_kidx];
  end

endmodule
