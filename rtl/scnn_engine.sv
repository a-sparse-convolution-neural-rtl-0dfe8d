// scnn_engine: sparse-convolution data flow over the hopping-index rule book.
//
// For every sparse input point i, in order:
//   1. the input memory delivers the point's features and its 16-bit end address;
//   2. the engine hops through the index memory from the previous end address up
//      to (not including) this end address, one rule per cycle;
//   3. each rule's 8-bit kernel index fetches the shared weight matrix from the
//      weight LUT, and the PE array (MAC mode) multiplies the features by it;
//   4. the PE_COLS column sums go to the output accumulator at the rule's target.
// The rule stream is a 4-stage pipeline (index read, LUT read, PE array, accumulate)
// that carries the features along, so the next input's fetch overlaps the
// draining rules of the previous one. Throughput is one rule (100 MACs) per cycle
// plus three cycles per input point for its input-memory fetch.
// Interface: start pulse with n_pts stable until done. done pulses once the last
// rule has left the PE array (acc_valid of that rule is in the same cycle); the
// accumulator finishes its write-back two cycles later.
// The four-step hopping flow follows the architecture; the pipeline and the
// input-stationary ordering details are this design's choices.
module scnn_engine
  import scnn_pkg::*;
#(
  parameter int unsigned NPTS      = 1024,
  parameter int unsigned IDX_DEPTH = 16384,
  parameter int unsigned LUT_DEPTH = 128,
  localparam int unsigned AW       = $clog2(NPTS),
  localparam int unsigned IAW      = $clog2(IDX_DEPTH),
  localparam int unsigned LAW      = $clog2(LUT_DEPTH)
)(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [AW:0]        n_pts,
  // input memory
  output logic               im_rd_en,
  output logic [AW-1:0]      im_rd_addr,
  input  fvec_t              im_rd_feat,
  input  logic [END_W-1:0]   im_rd_end,
  // index memory
  output logic               ix_rd_en,
  output logic [IAW-1:0]     ix_rd_addr,
  input  rule_t              ix_rd_data,
  // weight LUT
  output logic               lut_rd_en,
  output logic [LAW-1:0]     lut_rd_kidx,
  input  wmat_t              lut_rd_w,
  // PE array (MAC mode)
  output logic               arr_en,
  output fvec_t              arr_row_in,
  output wmat_t              arr_b,
  input  psvec_t             arr_col_sum,
  // output accumulator
  output logic               acc_valid,
  output logic [AW-1:0]      acc_addr,
  output psvec_t             acc_data,
  // status
  output logic               busy,
  output logic               done,
  output logic [31:0]        rule_cnt
);

  typedef enum logic [2:0] {S_IDLE, S_IRD, S_ILAT, S_RUN, S_DRAIN, S_DONE} state_e;

  state_e          state;
  logic [AW:0]     ii;
  logic [END_W:0]  ptr, stop_at;
  fvec_t           feat;

  logic            s1_v, s2_v, s3_v;
  fvec_t           s1_f, s2_f;
  logic [AW-1:0]   s2_t, s3_t;

  logic issue;
  assign issue = (state == S_RUN) && (ptr < stop_at);

  always_comb begin
    im_rd_en    = (state == S_IRD);
    im_rd_addr  = ii[AW-1:0];
    ix_rd_en    = issue;
    ix_rd_addr  = IAW'(ptr);
    lut_rd_en   = s1_v;
    lut_rd_kidx = LAW'(ix_rd_data.kidx);
    arr_en      = s2_v;
    arr_row_in  = s2_f;
    arr_b       = lut_rd_w;
    acc_valid   = s3_v;
    acc_addr    = s3_t;
    acc_data    = arr_col_sum;
    busy        = (state != S_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      ii       <= '0;
      ptr      <= '0;
      stop_at  <= '0;
      feat     <= '0;
      s1_v     <= 1'b0;
      s2_v     <= 1'b0;
      s3_v     <= 1'b0;
      s1_f     <= '0;
      s2_f     <= '0;
      s2_t     <= '0;
      s3_t     <= '0;
      done     <= 1'b0;
      rule_cnt <= '0;
    end else begin
      done <= 1'b0;
      // rule pipeline
      s1_v <= issue;
      if (issue) s1_f <= feat;
      s2_v <= s1_v;
      if (s1_v) begin
        s2_f <= s1_f;
        s2_t <= AW'(ix_rd_data.target);
      end
      s3_v <= s2_v;
      if (s2_v) s3_t <= s2_t;
      if (issue) begin
        ptr      <= ptr + 1;
        rule_cnt <= rule_cnt + 1;
      end

      unique case (state)
        S_IDLE: if (start) begin
          ii       <= '0;
          ptr      <= '0;
          rule_cnt <= '0;
          state    <= (n_pts == '0) ? S_DONE : S_IRD;
        end
        S_IRD:  state <= S_ILAT;
        S_ILAT: begin
          feat    <= im_rd_feat;
          stop_at <= (END_W+1)'(im_rd_end);
          state   <= S_RUN;
        end
        S_RUN: if (!issue) begin
          ii    <= ii + 1;
          state <= ((ii + 1) == n_pts) ? S_DRAIN : S_IRD;
        end
        S_DRAIN: if (!s1_v && !s2_v && !s3_v) state <= S_DONE;
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
