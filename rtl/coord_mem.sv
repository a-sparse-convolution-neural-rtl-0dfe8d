// coord_mem: coordinate memory of the sparse points of one sub-space.
//
// Entry n holds the (X, Y, Z, T) coordinate of sparse point n. The host writes
// the points sorted in increasing X, then Y, Z, T order; the coordinate manager
// relies on that order to narrow its neighbour search. The memory has one write
// port and NRP synchronous read ports so that a whole block of PE_ROWS
// consecutive candidates can be fetched in one cycle for the ten rows of the PE
// array (the banked layout that provides this on silicon is not described, so
// the memory is written as a plain multi-read array).
// Timing: rd_en[p] with rd_addr[p] in cycle t, rd_data[p] valid from t+1 and held
// until the next read on that port. Write takes effect at the clock edge.
// Storing coordinates separately from features follows the architecture; the
// depth (1024 points) and the port count are this design's choices.
module coord_mem
  import scnn_pkg::*;
#(
  parameter int unsigned NPTS = 1024,
  parameter int unsigned NRP  = PE_ROWS,
  localparam int unsigned AW  = $clog2(NPTS)
)(
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [AW-1:0]            wr_addr,
  input  point_t                   wr_data,
  input  logic [NRP-1:0]           rd_en,
  input  logic [NRP-1:0][AW-1:0]   rd_addr,
  output point_t [NRP-1:0]         rd_data
);

  point_t mem [NPTS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    for (int p = 0; p < NRP; p++)
      if (rd_en[p]) rd_data[p] <= mem[rd_addr[p]];
  end

endmodule
