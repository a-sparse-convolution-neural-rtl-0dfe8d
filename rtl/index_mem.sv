// index_mem: core index memory of the hopping-index rule book (HIRB).
//
// Each entry is one rule: an 8-bit kernel index (which weight-LUT row to use)
// and the address of the output point that receives the product. The coordinate
// manager appends rules input point by input point, so all rules of one input are
// contiguous and the input's "end" address bounds them. The SCNN engine reads
// them back in order, hopping from the input memory to this memory to the
// weight LUT and finally to the output memory.
// One write port, one synchronous read port: rd_en/rd_addr in cycle t, rd_data
// valid from t+1 and held.
// The entry contents follow the architecture; the depth (16384 rules, about 16
// per point for 1024 points) is this design's choice, sized so that all on-chip
// memories together come close to the chip's 108.5 kB.
module index_mem
  import scnn_pkg::*;
#(
  parameter int unsigned DEPTH = 16384,
  localparam int unsigned AW   = $clog2(DEPTH)
)(
  input  logic           clk,
  input  logic           wr_en,
  input  logic [AW-1:0]  wr_addr,
  input  rule_t          wr_data,
  input  logic           rd_en,
  input  logic [AW-1:0]  rd_addr,
  output rule_t          rd_data
);

  rule_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
