// input_mem: sparse input memory.
//
// Entry n holds the PE_ROWS-channel 8-bit feature vector of sparse input point n
// and its 16-bit "end" address: the index-memory address just past the last rule
// of point n. The rules of point n therefore occupy [end(n-1), end(n)), with
// end(-1) = 0, and the SCNN engine uses end(n) as the stop address while it hops
// through the index memory. Features are written by the host; end addresses by
// the coordinate manager while it builds the rule book. The two fields have
// separate write ports and one shared synchronous read port.
// Timing: rd_en/rd_addr in cycle t, rd_feat/rd_end valid from t+1 and held.
// The feature + 16-bit end address pairing follows the architecture; the depth
// is this design's choice.
module input_mem
  import scnn_pkg::*;
#(
  parameter int unsigned NPTS = 1024,
  localparam int unsigned AW  = $clog2(NPTS)
)(
  input  logic              clk,
  input  logic              fw_en,      // feature write (host)
  input  logic [AW-1:0]     fw_addr,
  input  fvec_t             fw_data,
  input  logic              ew_en,      // end-address write (coordinate manager)
  input  logic [AW-1:0]     ew_addr,
  input  logic [END_W-1:0]  ew_data,
  input  logic              rd_en,
  input  logic [AW-1:0]     rd_addr,
  output fvec_t             rd_feat,
  output logic [END_W-1:0]  rd_end
);

  fvec_t            feat_mem [NPTS];
  logic [END_W-1:0] end_mem  [NPTS];

  always_ff @(posedge clk) begin
    if (fw_en) feat_mem[fw_addr] <= fw_data;
    if (ew_en) end_mem[ew_addr]  <= ew_data;
    if (rd_en) begin
      rd_feat <= feat_mem[rd_addr];
      rd_end  <= end_mem[rd_addr];
    end
  end

endmodule
