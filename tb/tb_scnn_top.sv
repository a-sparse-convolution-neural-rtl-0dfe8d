// tb_scnn_top: end-to-end test of the accelerator at reduced memory sizes
// (64 points, 512 rules). The host side loads sorted coordinates, features and a
// weight LUT, runs a layer and reads every output back. The reference computes
// the sparse convolution directly from the coordinates, with no rule book:
//   acc[j][c] = sum over points i with |p_i - p_j| <= thr on every axis of
//               sum_r feat[i][r] * W[kidx(p_i - p_j)][r][c]
// and the 8-bit output as saturate8(relu(acc) >>> shift).
// Runs: 3D layer; second layer on the same coordinates reusing the rule book
// (SC phase only) with new features and ReLU; 4D layer; 3D layer with thr 2;
// dense 4D cloud that overflows the index memory (flag checked only).
// Each mechanism must happen at least once: partial-distance skip, window
// advance, rule-book overflow, DIST->MAC mode switch, rule-book reuse, output
// saturation, ReLU clamping. The accumulator bypass is only reported: rule books
// built by the coordinate manager never send two consecutive rules to the same
// target (each input's rules are in increasing target order and inputs are
// separated by fetch cycles), so it cannot fire here; its own testbench covers it.
// Rate: the SC phase (clear + rule stream + drain) must take at most
// rules + 4 * n_pts + 12 cycles.
module tb_scnn_top;
  import scnn_pkg::*;
  localparam int N = 64, D = 512, L = 128, AW = 6;

  logic clk = 0, rst_n = 0;
  logic coord_we = 0, feat_we = 0, w_we = 0, start = 0, run_cm = 0, run_sc = 0;
  logic [AW-1:0] coord_addr = '0, feat_addr = '0, rd_addr = '0;
  point_t coord_data = '0;
  fvec_t feat_data = '0, rd_data;
  logic [6:0] w_kidx = '0;
  logic [3:0] w_row = '0;
  data_t [9:0] w_data = '0;
  logic [AW:0] n_pts = '0;
  logic dim4 = 0, relu_en = 0, rd_en = 0;
  logic [2:0] thr = 3'd1;
  logic [4:0] shift = '0;
  logic busy, done, overflow, bypass_hit, rd_valid;
  logic [16:0] n_rules;
  logic [31:0] skip_cnt, winadv_cnt, block_cnt, mac_rules, cm_cycles, sc_cycles;
  avec_t rd_acc;

  scnn_top #(.NPTS(N), .IDX_DEPTH(D), .LUT_DEPTH(L)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int ev_skip = 0, ev_winadv = 0, ev_bypass = 0, ev_overflow = 0, ev_switch = 0;
  int ev_reuse = 0, ev_sat = 0, ev_relu = 0;
  always @(posedge clk) if (rst_n && bypass_hit) ev_bypass++;

  point_t pts [N];
  fvec_t  feat [N];
  wmat_t  w [L];
  int npts;

  initial begin
    #20000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic gen(input int xs, ys, zs, ts, pct);
    npts = 0;
    for (int x = 0; x < xs; x++)
      for (int y = 0; y < ys; y++)
        for (int z = 0; z < zs; z++)
          for (int t = 0; t < ts; t++)
            if (npts < N && $urandom_range(0, 99) < pct) begin
              pts[npts][AX_X] = 8'(2 * x + 10); pts[npts][AX_Y] = 8'(y);
              pts[npts][AX_Z] = 8'(z + 100);    pts[npts][AX_T] = 8'(t + 1);
              npts++;
            end
    for (int i = 0; i < npts; i++) begin
      @(negedge clk); coord_we = 1; coord_addr = AW'(i); coord_data = pts[i];
    end
    @(negedge clk); coord_we = 0;
  endtask

  task automatic load_feat(input int amp);
    for (int i = 0; i < npts; i++) begin
      for (int r = 0; r < 10; r++) feat[i][r] = data_t'($urandom_range(0, 2 * amp) - amp);
      @(negedge clk); feat_we = 1; feat_addr = AW'(i); feat_data = feat[i];
    end
    @(negedge clk); feat_we = 0;
  endtask

  task automatic load_w(input int amp);
    for (int k = 0; k < L; k++)
      for (int r = 0; r < 10; r++) begin
        for (int c = 0; c < 10; c++) w[k][r][c] = data_t'($urandom_range(0, 2 * amp) - amp);
        @(negedge clk); w_we = 1; w_kidx = 7'(k); w_row = 4'(r); w_data = w[k][r];
      end
    @(negedge clk); w_we = 0;
  endtask

  task automatic run(input bit cm, input bit sc, input bit d4, input int th, input bit relu,
                     input int sh, input bit expect_ovf, input string name);
    longint acc [N][10];
    int k, nb_total;
    k = 2 * th + 1;
    nb_total = 0;
    for (int j = 0; j < npts; j++) for (int c = 0; c < 10; c++) acc[j][c] = 0;
    for (int j = 0; j < npts; j++)
      for (int i = 0; i < npts; i++) begin
        bit nb;
        int dig [4];
        nb = 1;
        for (int a = 0; a < 4; a++) begin
          int o;
          o = (a == AX_T && !d4) ? 0 : int'(pts[i][a]) - int'(pts[j][a]);
          if (o > th || o < -th) nb = 0;
          dig[a] = (a == AX_T && !d4) ? 0 : o + th;
        end
        if (nb) begin
          int kk;
          nb_total++;
          kk = ((dig[3] * k + dig[2]) * k + dig[1]) * k + dig[0];
          for (int c = 0; c < 10; c++)
            for (int r = 0; r < 10; r++)
              acc[j][c] += longint'(feat[i][r]) * longint'(w[kk][r][c]);
        end
      end
    @(negedge clk);
    run_cm = cm; run_sc = sc; dim4 = d4; thr = 3'(th); relu_en = relu; shift = 5'(sh);
    n_pts = (AW+1)'(npts);
    start = 1; @(negedge clk); start = 0;
    wait (done); @(negedge clk);
    if (cm && sc && cm_cycles > 0 && sc_cycles > 0) ev_switch++;
    if (!cm && sc) ev_reuse++;
    if (cm) begin
      ev_skip += skip_cnt; ev_winadv += winadv_cnt;
      checks++;
      if (overflow != expect_ovf) begin failures++; $display("%s: overflow %0d", name, overflow); end
      if (overflow) ev_overflow++;
    end
    $display("%s: %0d points, %0d neighbour pairs, %0d rules, CM %0d cycles, SC %0d cycles, %0d skips",
             name, npts, nb_total, n_rules, cm_cycles, sc_cycles, skip_cnt);
    if (expect_ovf) return;
    checks += 2;
    if (int'(n_rules) != nb_total || int'(mac_rules) != nb_total) begin
      failures++; $display("%s: rules %0d/%0d exp %0d", name, n_rules, mac_rules, nb_total);
    end
    if (int'(sc_cycles) > nb_total + 4 * npts + 12) begin failures++; $display("%s: SC too slow", name); end
    for (int j = 0; j < npts; j++) begin
      rd_en = 1; rd_addr = AW'(j);
      @(negedge clk); rd_en = 0;
      @(negedge clk);
      checks++;
      if (!rd_valid) begin failures++; $display("%s: rd_valid", name); end
      for (int c = 0; c < 10; c++) begin
        longint v;
        int q;
        checks += 2;
        if (rd_acc[c] != acc_t'(acc[j][c])) begin
          failures++; $display("%s: acc[%0d][%0d] %0d exp %0d", name, j, c, rd_acc[c], acc[j][c]);
        end
        v = acc[j][c];
        if (relu && v < 0) begin v = 0; ev_relu++; end
        v = v >>> sh;
        if (v > 127) begin v = 127; ev_sat++; end
        if (v < -128) begin v = -128; ev_sat++; end
        q = int'(v);
        if (int'(rd_data[c]) != q) begin
          failures++; $display("%s: out[%0d][%0d] %0d exp %0d", name, j, c, rd_data[c], q);
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_w(30);
    gen(8, 6, 5, 1, 20);  load_feat(40); run(1, 1, 0, 1, 0, 7, 0, "3D layer 1");
                          load_feat(40); run(0, 1, 0, 1, 1, 6, 0, "3D layer 2 (rule book reused)");
    gen(5, 4, 4, 3, 25);  load_feat(40); run(1, 1, 1, 1, 1, 5, 0, "4D layer");
    gen(8, 6, 5, 1, 20);  load_feat(20); run(1, 1, 0, 2, 0, 9, 0, "3D thr 2");
    gen(3, 3, 3, 3, 95);  load_feat(20); run(1, 1, 1, 1, 0, 8, 1, "4D dense, overflow");
    checks += 7;
    if (ev_skip == 0)     begin failures++; $display("no partial-distance skip"); end
    if (ev_winadv == 0)   begin failures++; $display("no window advance"); end
    if (ev_overflow == 0) begin failures++; $display("no overflow"); end
    if (ev_switch == 0)   begin failures++; $display("no mode switch"); end
    if (ev_reuse == 0)    begin failures++; $display("no rule-book reuse"); end
    if (ev_sat == 0)      begin failures++; $display("no saturation"); end
    if (ev_relu == 0)     begin failures++; $display("no ReLU clamp"); end
    $display("events: skip %0d, window %0d, bypass %0d, overflow %0d, switch %0d, reuse %0d, sat %0d, relu %0d",
             ev_skip, ev_winadv, ev_bypass, ev_overflow, ev_switch, ev_reuse, ev_sat, ev_relu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
