// coord_manager: builds the hopping-index rule book (HIRB) for one sub-space.
//
// Two sparse points are neighbours when every per-axis distance |d| is at most
// the threshold thr; the offset between them then selects one of K^D kernel
// weights (K = 2*thr+1, D = 3 or 4). For each input point i (the query), the
// manager finds all neighbouring points j and appends one rule {kernel index,
// target j} per neighbour to the index memory, then writes the running rule count
// as the input's 16-bit "end" address. Output points are the input points
// (submanifold sparse convolution).
//
// Search narrowing. Points are stored sorted by X, then Y, Z, T, so the
// candidates with |dx| <= thr form one contiguous range. A window start pointer
// only moves forward: at the start of a query it is advanced past candidates with
// dx < -thr, and a scan stops at the first candidate with dx > thr.
// Distances are computed on the PE array in DIST mode, PE_ROWS candidates per
// block (one per array row). Phase 1 activates only the X, Z and T columns; if no
// candidate of the block is within thr in Z and T (and inside the X window),
// phase 2 (Y) is skipped entirely (skip_cnt counts these). Otherwise phase 2
// computes the Y distances and the surviving rules are written, one per cycle.
// If the index memory fills up, further rules are dropped and overflow is set.
//
// Kernel index for input i contributing to output j, with o = p_i - p_j:
//   kidx = sum over axes a of (o_a + thr) * K^a   (axis 0 = X ... 3 = T;
//   in 3D mode the T term is absent)
// kidx must stay below the weight LUT depth: thr <= 1 in 4D, thr <= 2 in 3D.
//
// Interface: start pulse with n_pts, dim4 and thr stable until done (one-cycle
// pulse). Coordinate memory reads have one cycle latency, the PE array one cycle.
// Cycle cost per block: 4 cycles, plus 2 for phase 2 when not skipped, plus one
// per rule written; 2 cycles per query to fetch it and 1 to write its end.
// The distance threshold, the sorted X,Y,Z,T order, the Z/T-first partial
// distance skipping and the use of the PE array follow the architecture. The
// per-axis (Chebyshev) distance, the X-window form of the search narrowing (in
// place of the octree levels, which are not detailed) and the block schedule are
// this design's choices.
module coord_manager
  import scnn_pkg::*;
#(
  parameter int unsigned NPTS      = 1024,
  parameter int unsigned IDX_DEPTH = 16384,
  parameter int unsigned NRP       = PE_ROWS,
  localparam int unsigned AW       = $clog2(NPTS),
  localparam int unsigned IAW      = $clog2(IDX_DEPTH)
)(
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  logic [AW:0]                    n_pts,
  input  logic                           dim4,
  input  logic [2:0]                     thr,
  // coordinate memory read ports
  output logic [NRP-1:0]                 cm_rd_en,
  output logic [NRP-1:0][AW-1:0]         cm_rd_addr,
  input  point_t [NRP-1:0]               cm_rd_data,
  // PE array (DIST mode)
  output logic                           arr_en,
  output logic [PE_COLS-1:0]             arr_col_en,
  output logic [PE_COLS-1:0][DATA_W-1:0] arr_col_in,
  output logic [NRP-1:0][PE_COLS-1:0][DATA_W-1:0] arr_b,
  input  logic signed [NRP-1:0][PE_COLS-1:0][DIFF_W-1:0] arr_dist,
  // index memory write
  output logic                           iw_en,
  output logic [IAW-1:0]                 iw_addr,
  output rule_t                          iw_data,
  // end-address write into the input memory
  output logic                           ew_en,
  output logic [AW-1:0]                  ew_addr,
  output logic [END_W-1:0]               ew_data,
  // status
  output logic                           busy,
  output logic                           done,
  output logic                           overflow,
  output logic [END_W:0]                 n_rules,
  output logic [31:0]                    skip_cnt,
  output logic [31:0]                    block_cnt,
  output logic [31:0]                    winadv_cnt
);

  typedef enum logic [3:0] {
    S_IDLE, S_QRD, S_QLAT, S_BRD, S_BLAT, S_P1, S_C1, S_P2, S_C2, S_WR, S_ENDW, S_DONE
  } state_e;

  state_e         state;
  logic [AW:0]    qi, win_lo, blk;
  point_t         q;
  point_t [NRP-1:0] cand;
  logic [NRP-1:0] cvalid, mask;
  logic           first_blk, stop;
  logic [END_W:0] wr_ptr;
  diff_t [NRP-1:0] dx_r, dz_r, dt_r;
  logic [NRP-1:0][KIDX_W-1:0] kidx_r;

  // -------- phase-1 evaluation (combinational on array outputs)
  diff_t          thr_s;
  logic [NRP-1:0] low, high, pass1;
  int unsigned    nlow;
  always_comb begin
    thr_s = diff_t'(thr);
    nlow  = 0;
    for (int r = 0; r < NRP; r++) begin
      diff_t dx, dz, dt;
      logic  zt_ok;
      dx = arr_dist[r][AX_X];
      dz = arr_dist[r][AX_Z];
      dt = arr_dist[r][AX_T];
      low[r]  = cvalid[r] && (dx < -thr_s);
      high[r] = cvalid[r] && (dx > thr_s);
      zt_ok   = (dz <= thr_s) && (dz >= -thr_s) &&
                (!dim4 || ((dt <= thr_s) && (dt >= -thr_s)));
      pass1[r] = cvalid[r] && !low[r] && !high[r] && zt_ok;
      if (low[r]) nlow++;
    end
  end

  // -------- phase-2 evaluation and kernel index
  logic [NRP-1:0]             pass2;
  logic [NRP-1:0][KIDX_W-1:0] kidx_c;
  always_comb begin
    int unsigned k, dig [NDIM];
    diff_t d [NDIM];
    k = 2 * int'(thr) + 1;
    for (int r = 0; r < NRP; r++) begin
      d[AX_X] = dx_r[r];
      d[AX_Y] = arr_dist[r][AX_Y];
      d[AX_Z] = dz_r[r];
      d[AX_T] = dim4 ? dt_r[r] : diff_t'(0);
      pass2[r] = mask[r] && (d[AX_Y] <= thr_s) && (d[AX_Y] >= -thr_s);
      // offset of the input (query) relative to the output (candidate) is -d
      for (int a = 0; a < NDIM; a++) dig[a] = unsigned'(int'(thr_s) - int'(d[a]));
      if (!dim4) dig[AX_T] = 0;   // 3D: the T digit does not exist
      kidx_c[r] = KIDX_W'(((dig[AX_T] * k + dig[AX_Z]) * k + dig[AX_Y]) * k + dig[AX_X]);
    end
  end

  // lowest set bit of the rule mask
  logic [$clog2(NRP)-1:0] pick;
  always_comb begin
    pick = '0;
    for (int r = NRP - 1; r >= 0; r--) if (mask[r]) pick = r[$clog2(NRP)-1:0];
  end

  // -------- datapath outputs
  always_comb begin
    cm_rd_en   = '0;
    cm_rd_addr = '0;
    if (state == S_QRD) begin
      cm_rd_en[0]   = 1'b1;
      cm_rd_addr[0] = qi[AW-1:0];
    end else if (state == S_BRD) begin
      for (int r = 0; r < NRP; r++) begin
        cm_rd_en[r]   = 1'b1;
        cm_rd_addr[r] = AW'(blk + (AW+1)'(r));
      end
    end
    arr_en     = (state == S_P1) || (state == S_P2);
    arr_col_en = '0;
    if (state == S_P1) begin
      arr_col_en[AX_X] = 1'b1;
      arr_col_en[AX_Z] = 1'b1;
      arr_col_en[AX_T] = dim4;
    end else if (state == S_P2) begin
      arr_col_en[AX_Y] = 1'b1;
    end
    arr_col_in = '0;
    arr_b      = '0;
    for (int a = 0; a < NDIM; a++) begin
      arr_col_in[a] = q[a];
      for (int r = 0; r < NRP; r++) arr_b[r][a] = cand[r][a];
    end
    iw_en   = (state == S_WR) && (mask != '0) && (wr_ptr < (END_W+1)'(IDX_DEPTH));
    iw_addr = IAW'(wr_ptr);
    iw_data = '{kidx: kidx_r[pick], target: TGT_W'(blk + (AW+1)'(pick))};
    ew_en   = (state == S_ENDW);
    ew_addr = qi[AW-1:0];
    ew_data = END_W'(wr_ptr);
    busy    = (state != S_IDLE);
    n_rules = wr_ptr;
  end

  // -------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      qi         <= '0;
      win_lo     <= '0;
      blk        <= '0;
      q          <= '0;
      cand       <= '0;
      cvalid     <= '0;
      mask       <= '0;
      first_blk  <= 1'b0;
      stop       <= 1'b0;
      wr_ptr     <= '0;
      dx_r       <= '0;
      dz_r       <= '0;
      dt_r       <= '0;
      kidx_r     <= '0;
      done       <= 1'b0;
      overflow   <= 1'b0;
      skip_cnt   <= '0;
      block_cnt  <= '0;
      winadv_cnt <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          qi         <= '0;
          win_lo     <= '0;
          wr_ptr     <= '0;
          overflow   <= 1'b0;
          skip_cnt   <= '0;
          block_cnt  <= '0;
          winadv_cnt <= '0;
          state      <= (n_pts == '0) ? S_DONE : S_QRD;
        end
        S_QRD:  state <= S_QLAT;
        S_QLAT: begin
          q         <= cm_rd_data[0];
          blk       <= win_lo;
          first_blk <= 1'b1;
          state     <= S_BRD;
        end
        S_BRD:  state <= S_BLAT;
        S_BLAT: begin
          cand <= cm_rd_data;
          for (int r = 0; r < NRP; r++) cvalid[r] <= (blk + (AW+1)'(r)) < n_pts;
          block_cnt <= block_cnt + 1;
          state <= S_P1;
        end
        S_P1:   state <= S_C1;
        S_C1: begin
          for (int r = 0; r < NRP; r++) begin
            dx_r[r] <= arr_dist[r][AX_X];
            dz_r[r] <= arr_dist[r][AX_Z];
            dt_r[r] <= arr_dist[r][AX_T];
          end
          if (first_blk) begin
            if (nlow != 0) begin
              win_lo     <= blk + (AW+1)'(nlow);
              winadv_cnt <= winadv_cnt + 1;
            end
            first_blk <= (nlow == NRP);
          end
          stop <= (high != '0) || ((blk + (AW+1)'(NRP)) >= n_pts);
          mask <= pass1;
          if (pass1 != '0) state <= S_P2;
          else begin
            skip_cnt <= skip_cnt + 1;
            state    <= S_WR;     // empty mask: goes straight to the next block
          end
        end
        S_P2:   state <= S_C2;
        S_C2: begin
          mask   <= pass2;
          kidx_r <= kidx_c;
          state  <= S_WR;
        end
        S_WR: begin
          if (mask != '0) begin
            mask[pick] <= 1'b0;
            if (wr_ptr < (END_W+1)'(IDX_DEPTH)) wr_ptr <= wr_ptr + 1;
            else overflow <= 1'b1;
          end else if (stop) begin
            state <= S_ENDW;
          end else begin
            blk   <= blk + (AW+1)'(NRP);
            state <= S_BRD;
          end
        end
        S_ENDW: begin
          qi    <= qi + 1;
          state <= ((qi + 1) == n_pts) ? S_DONE : S_QRD;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
