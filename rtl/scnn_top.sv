// scnn_top: 3D/4D sparse CNN accelerator with a hopping-index rule book.
//
// The accelerator processes one sub-space of a point cloud at a time. The host
// loads the sorted coordinates (coord_mem), the 10-channel input features
// (input_mem) and the weight matrices of every kernel offset (weight_lut), then
// starts a run. The coordinate manager finds neighbouring points with the PE
// array in DIST mode and writes the rule book into index_mem together with each
// input's end address; the SCNN engine then walks the rule book, runs the PE
// array in MAC mode (100 MACs per rule) and accumulates into out_accum. The host
// reads the results through post_proc (ReLU, shift, saturate to 8 bit).
// The single PE array is shared: top_ctrl switches its operands between the
// coordinate manager and the SCNN engine by phase.
//
// Host interface: all load ports write in the cycle their enable is high; do not
// load while busy. start is a one-cycle pulse; run_cm/run_sc choose the phases
// (run_sc alone reuses the stored rule book); n_pts, dim4, thr, relu_en, shift
// must stay stable during a run. Readout: rd_en/rd_addr in cycle t gives
// rd_valid/rd_data (8-bit) and rd_acc (raw accumulators) in cycle t+2.
// The clock is an input; the on-chip oscillator and the scan interface of the
// original chip are not part of this RTL.
// The block structure follows the architecture; memory depths, the host
// interface and the post-processing contents are this design's choices.
module scnn_top
  import scnn_pkg::*;
#(
  parameter int unsigned NPTS      = 1024,
  parameter int unsigned IDX_DEPTH = 16384,
  parameter int unsigned LUT_DEPTH = 128,
  localparam int unsigned AW       = $clog2(NPTS),
  localparam int unsigned LAW      = $clog2(LUT_DEPTH),
  localparam int unsigned IAW      = $clog2(IDX_DEPTH),
  localparam int unsigned RW       = $clog2(PE_ROWS)
)(
  input  logic                 clk,
  input  logic                 rst_n,
  // host loading
  input  logic                 coord_we,
  input  logic [AW-1:0]        coord_addr,
  input  point_t               coord_data,
  input  logic                 feat_we,
  input  logic [AW-1:0]        feat_addr,
  input  fvec_t                feat_data,
  input  logic                 w_we,
  input  logic [LAW-1:0]       w_kidx,
  input  logic [RW-1:0]        w_row,
  input  data_t [PE_COLS-1:0]  w_data,
  // run control
  input  logic                 start,
  input  logic                 run_cm,
  input  logic                 run_sc,
  input  logic [AW:0]          n_pts,
  input  logic                 dim4,
  input  logic [2:0]           thr,
  input  logic                 relu_en,
  input  logic [4:0]           shift,
  output logic                 busy,
  output logic                 done,
  // status
  output logic                 overflow,
  output logic [END_W:0]       n_rules,
  output logic [31:0]          skip_cnt,
  output logic [31:0]          winadv_cnt,
  output logic [31:0]          block_cnt,
  output logic [31:0]          mac_rules,
  output logic [31:0]          cm_cycles,
  output logic [31:0]          sc_cycles,
  output logic                 bypass_hit,
  // readout
  input  logic                 rd_en,
  input  logic [AW-1:0]        rd_addr,
  output logic                 rd_valid,
  output fvec_t                rd_data,
  output avec_t                rd_acc
);

  // ---------------- controller
  logic          cm_start, cm_done, sc_start, sc_done, clr_en;
  logic [AW-1:0] clr_addr;
  pe_mode_e      arr_mode;

  top_ctrl #(.NPTS(NPTS)) u_ctrl (
    .clk, .rst_n, .start, .run_cm, .run_sc, .n_pts,
    .cm_start, .cm_done, .sc_start, .sc_done, .clr_en, .clr_addr, .arr_mode,
    .busy, .done, .cm_cycles, .sc_cycles
  );

  // ---------------- memories
  logic [PE_ROWS-1:0]          cm_rd_en;
  logic [PE_ROWS-1:0][AW-1:0]  cm_rd_addr;
  point_t [PE_ROWS-1:0]        cm_rd_data;

  coord_mem #(.NPTS(NPTS), .NRP(PE_ROWS)) u_coord (
    .clk, .wr_en(coord_we), .wr_addr(coord_addr), .wr_data(coord_data),
    .rd_en(cm_rd_en), .rd_addr(cm_rd_addr), .rd_data(cm_rd_data)
  );

  logic              ew_en, im_rd_en;
  logic [AW-1:0]     ew_addr, im_rd_addr;
  logic [END_W-1:0]  ew_data, im_rd_end;
  fvec_t             im_rd_feat;

  input_mem #(.NPTS(NPTS)) u_input (
    .clk, .fw_en(feat_we), .fw_addr(feat_addr), .fw_data(feat_data),
    .ew_en, .ew_addr, .ew_data,
    .rd_en(im_rd_en), .rd_addr(im_rd_addr), .rd_feat(im_rd_feat), .rd_end(im_rd_end)
  );

  logic           iw_en, ix_rd_en;
  logic [IAW-1:0] iw_addr, ix_rd_addr;
  rule_t          iw_data, ix_rd_data;

  index_mem #(.DEPTH(IDX_DEPTH)) u_index (
    .clk, .wr_en(iw_en), .wr_addr(iw_addr), .wr_data(iw_data),
    .rd_en(ix_rd_en), .rd_addr(ix_rd_addr), .rd_data(ix_rd_data)
  );

  logic           lut_rd_en;
  logic [LAW-1:0] lut_rd_kidx;
  wmat_t          lut_rd_w;

  weight_lut #(.DEPTH(LUT_DEPTH)) u_lut (
    .clk, .wr_en(w_we), .wr_kidx(w_kidx), .wr_row(w_row), .wr_data(w_data),
    .rd_en(lut_rd_en), .rd_kidx(lut_rd_kidx), .rd_w(lut_rd_w)
  );

  // ---------------- shared PE array
  logic                                   cm_arr_en, sc_arr_en, arr_en, arr_valid;
  logic [PE_COLS-1:0]                     cm_col_en;
  logic [PE_COLS-1:0][DATA_W-1:0]         cm_col_in;
  logic [PE_ROWS-1:0][PE_COLS-1:0][DATA_W-1:0] cm_b, arr_b;
  fvec_t                                  sc_row_in;
  wmat_t                                  sc_b;
  psvec_t                                 arr_col_sum;
  logic signed [PE_ROWS-1:0][PE_COLS-1:0][DIFF_W-1:0] arr_dist;

  always_comb begin
    if (arr_mode == MODE_DIST) begin
      arr_en = cm_arr_en;
      arr_b  = cm_b;
    end else begin
      arr_en = sc_arr_en;
      arr_b  = sc_b;
    end
  end

  pe_array #(.ROWS(PE_ROWS), .COLS(PE_COLS)) u_array (
    .clk, .rst_n, .en(arr_en), .mode(arr_mode), .col_en(cm_col_en),
    .row_in(sc_row_in), .col_in(cm_col_in), .b_in(arr_b),
    .out_valid(arr_valid), .col_sum(arr_col_sum), .diffs(arr_dist)
  );

  // ---------------- coordinate manager
  logic cm_busy;

  coord_manager #(.NPTS(NPTS), .IDX_DEPTH(IDX_DEPTH), .NRP(PE_ROWS)) u_cm (
    .clk, .rst_n, .start(cm_start), .n_pts, .dim4, .thr,
    .cm_rd_en, .cm_rd_addr, .cm_rd_data,
    .arr_en(cm_arr_en), .arr_col_en(cm_col_en), .arr_col_in(cm_col_in), .arr_b(cm_b),
    .arr_dist,
    .iw_en, .iw_addr, .iw_data, .ew_en, .ew_addr, .ew_data,
    .busy(cm_busy), .done(cm_done), .overflow, .n_rules, .skip_cnt, .block_cnt, .winadv_cnt
  );

  // ---------------- SCNN engine and output side
  logic          acc_valid, sc_busy;
  logic [AW-1:0] acc_addr;
  psvec_t        acc_data;

  scnn_engine #(.NPTS(NPTS), .IDX_DEPTH(IDX_DEPTH), .LUT_DEPTH(LUT_DEPTH)) u_sc (
    .clk, .rst_n, .start(sc_start), .n_pts,
    .im_rd_en, .im_rd_addr, .im_rd_feat, .im_rd_end,
    .ix_rd_en, .ix_rd_addr, .ix_rd_data,
    .lut_rd_en, .lut_rd_kidx, .lut_rd_w,
    .arr_en(sc_arr_en), .arr_row_in(sc_row_in), .arr_b(sc_b), .arr_col_sum,
    .acc_valid, .acc_addr, .acc_data,
    .busy(sc_busy), .done(sc_done), .rule_cnt(mac_rules)
  );

  logic  rd_en_q;
  avec_t rd_acc_q;

  out_accum #(.NPTS(NPTS)) u_acc (
    .clk, .rst_n, .clr_en, .clr_addr, .acc_valid, .acc_addr, .acc_data,
    .rd_en, .rd_addr, .rd_data(rd_acc_q), .bypass_hit
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_en_q <= 1'b0;
      rd_acc  <= '0;
    end else begin
      rd_en_q <= rd_en;
      if (rd_en_q) rd_acc <= rd_acc_q;
    end
  end

  post_proc u_post (
    .clk, .rst_n, .in_valid(rd_en_q), .in_data(rd_acc_q), .relu_en, .shift,
    .out_valid(rd_valid), .out_data(rd_data)
  );

  // The two phases own the shared PE array in turn, never together, and the
  // array's results are only consumed in the phase that issued them.
  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n) !(cm_busy && sc_busy));
  a_mac_owner: assert property (@(posedge clk) disable iff (!rst_n)
                                 acc_valid |-> (arr_valid && arr_mode == MODE_MAC));

endmodule
