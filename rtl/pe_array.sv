// pe_array: the 10 x 10 reconfigurable PE array.
//
// MAC mode (sparse convolution): row r receives input channel r of the current
// sparse input point (row_in[r], broadcast along the row) and PE (r,c) holds the
// weight connecting input channel r to output channel c. Each column sums its ten
// products, so one cycle turns one input point and one kernel offset into ten
// output-channel partial sums (col_sum). All 100 PEs do useful work per rule.
// DIST mode (coordinate management): column c receives axis c of the query point
// (col_in[c], broadcast down the column) and PE (r,c) holds axis c of candidate
// point r, so row r yields the per-axis differences of candidate r. Only columns
// whose bit in col_en is set are active; the others are held at zero, which is
// how the coordinate manager evaluates partial distances axis group by axis group.
// Timing: operands in the cycle en is high, results (col_sum, diffs, out_valid)
// registered one cycle later and held until the next enabled cycle.
// The array size and the dual use follow the architecture; the row/column to
// channel mapping is this design's choice.
module pe_array
  import scnn_pkg::*;
#(
  parameter int unsigned ROWS = PE_ROWS,
  parameter int unsigned COLS = PE_COLS
)(
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   en,
  input  pe_mode_e                               mode,
  input  logic [COLS-1:0]                        col_en,   // DIST mode column enables
  input  logic [ROWS-1:0][DATA_W-1:0]            row_in,   // MAC: features
  input  logic [COLS-1:0][DATA_W-1:0]            col_in,   // DIST: query coordinate
  input  logic [ROWS-1:0][COLS-1:0][DATA_W-1:0]  b_in,     // MAC: weights, DIST: candidates
  output logic                                   out_valid,
  output logic signed [COLS-1:0][PSUM_W-1:0]     col_sum,
  output logic signed [ROWS-1:0][COLS-1:0][DIFF_W-1:0] diffs
);

  logic signed [PROD_W-1:0] res [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [DATA_W-1:0] a_op, b_op;
      always_comb begin
        if (mode == MODE_MAC) begin
          a_op = row_in[r];
          b_op = b_in[r][c];
        end else begin
          a_op = col_en[c] ? col_in[c]  : '0;
          b_op = col_en[c] ? b_in[r][c] : '0;
        end
      end
      scnn_pe u_pe (.mode(mode), .a(a_op), .b(b_op), .res(res[r][c]));
    end
  end

  logic signed [COLS-1:0][PSUM_W-1:0] sum_d;
  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      sum_d[c] = '0;
      for (int r = 0; r < ROWS; r++) sum_d[c] += PSUM_W'(res[r][c]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      col_sum   <= '0;
      diffs     <= '0;
    end else begin
      out_valid <= en;
      if (en) begin
        col_sum <= sum_d;
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++)
            diffs[r][c] <= DIFF_W'(res[r][c]);
      end
    end
  end

endmodule
