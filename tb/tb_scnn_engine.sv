// tb_scnn_engine: sparse-convolution data flow against a direct reference.
// The engine runs with the real input memory, index memory, weight LUT and PE
// array (32 points, 1024 rules). A random rule book is loaded: each input gets
// 0..6 rules with random kernel indices and targets, its end address being the
// running count. The accumulation stream leaving the engine is summed in the
// testbench and compared with out[t][c] = sum over rules of
// sum_r feat[i][r] * W[k][r][c], computed from the loaded data only. Also
// checked: the number of rules streamed, the engine's rule counter, and the
// rate: one rule per cycle plus at most three cycles per input point.
module tb_scnn_engine;
  import scnn_pkg::*;
  localparam int N = 32, D = 1024, L = 128, AW = 5;

  logic clk = 0, rst_n = 0, start = 0;
  logic [AW:0] n_pts = '0;
  logic im_rd_en, ix_rd_en, lut_rd_en, arr_en, acc_valid, busy, done;
  logic [AW-1:0] im_rd_addr, acc_addr;
  fvec_t im_rd_feat, arr_row_in;
  logic [15:0] im_rd_end;
  logic [9:0] ix_rd_addr;
  rule_t ix_rd_data;
  logic [6:0] lut_rd_kidx;
  wmat_t lut_rd_w, arr_b;
  psvec_t arr_col_sum, acc_data;
  logic [31:0] rule_cnt;

  // host-side load ports
  logic fw_en = 0, ew_en = 0, iw_en = 0, ww_en = 0;
  logic [AW-1:0] fw_addr = '0, ew_addr = '0;
  fvec_t fw_data = '0;
  logic [15:0] ew_data = '0;
  logic [9:0] iw_addr = '0;
  rule_t iw_data = '0;
  logic [6:0] ww_kidx = '0;
  logic [3:0] ww_row = '0;
  data_t [9:0] ww_data = '0;

  input_mem  #(.NPTS(N))  u_im (.clk, .fw_en, .fw_addr, .fw_data, .ew_en, .ew_addr, .ew_data,
                                .rd_en(im_rd_en), .rd_addr(im_rd_addr), .rd_feat(im_rd_feat), .rd_end(im_rd_end));
  index_mem  #(.DEPTH(D)) u_ix (.clk, .wr_en(iw_en), .wr_addr(iw_addr), .wr_data(iw_data),
                                .rd_en(ix_rd_en), .rd_addr(ix_rd_addr), .rd_data(ix_rd_data));
  weight_lut #(.DEPTH(L)) u_lut (.clk, .wr_en(ww_en), .wr_kidx(ww_kidx), .wr_row(ww_row), .wr_data(ww_data),
                                .rd_en(lut_rd_en), .rd_kidx(lut_rd_kidx), .rd_w(lut_rd_w));
  logic arr_valid;
  logic signed [9:0][9:0][DIFF_W-1:0] unused_d;
  pe_array u_arr (.clk, .rst_n, .en(arr_en), .mode(MODE_MAC), .col_en('0), .row_in(arr_row_in),
                  .col_in('0), .b_in(arr_b), .out_valid(arr_valid), .col_sum(arr_col_sum), .diffs(unused_d));
  scnn_engine #(.NPTS(N), .IDX_DEPTH(D), .LUT_DEPTH(L)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint got [N][10];
  int streamed = 0;
  always @(posedge clk) if (rst_n && acc_valid) begin
    streamed++;
    for (int c = 0; c < 10; c++) got[acc_addr][c] += longint'($signed(acc_data[c]));
  end

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    fvec_t feat [N];
    wmat_t w [L];
    rule_t rules [$];
    int endp [N];
    longint expv [N][10];
    int cyc, nr;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < L; k++)
      for (int r = 0; r < 10; r++) begin
        for (int c = 0; c < 10; c++) w[k][r][c] = data_t'($urandom);
        @(negedge clk); ww_en = 1; ww_kidx = 7'(k); ww_row = 4'(r); ww_data = w[k][r];
      end
    @(negedge clk); ww_en = 0;
    for (int i = 0; i < N; i++) begin
      int nrule;
      for (int r = 0; r < 10; r++) feat[i][r] = data_t'($urandom);
      if (i == 0) for (int r = 0; r < 10; r++) feat[i][r] = -128;
      nrule = (i % 7 == 3) ? 0 : $urandom_range(1, 6);
      for (int q = 0; q < nrule; q++)
        rules.push_back('{kidx: 8'($urandom_range(0, L - 1)), target: 16'($urandom_range(0, N - 1))});
      endp[i] = rules.size();
      @(negedge clk);
      fw_en = 1; fw_addr = AW'(i); fw_data = feat[i];
      ew_en = 1; ew_addr = AW'(i); ew_data = 16'(endp[i]);
    end
    @(negedge clk); fw_en = 0; ew_en = 0;
    foreach (rules[q]) begin
      @(negedge clk); iw_en = 1; iw_addr = 10'(q); iw_data = rules[q];
    end
    @(negedge clk); iw_en = 0;
    // reference
    for (int t = 0; t < N; t++) for (int c = 0; c < 10; c++) begin expv[t][c] = 0; got[t][c] = 0; end
    for (int i = 0; i < N; i++)
      for (int q = (i == 0 ? 0 : endp[i - 1]); q < endp[i]; q++)
        for (int c = 0; c < 10; c++)
          for (int r = 0; r < 10; r++)
            expv[rules[q].target][c] += longint'(feat[i][r]) * longint'(w[rules[q].kidx][r][c]);
    nr = rules.size();
    // run
    n_pts = (AW+1)'(N);
    start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk);
    for (int t = 0; t < N; t++) for (int c = 0; c < 10; c++) begin
      checks++;
      if (got[t][c] != expv[t][c]) begin failures++; $display("out[%0d][%0d] %0d exp %0d", t, c, got[t][c], expv[t][c]); end
    end
    checks += 3;
    if (streamed != nr) begin failures++; $display("streamed %0d of %0d rules", streamed, nr); end
    if (int'(rule_cnt) != nr) begin failures++; $display("rule_cnt %0d", rule_cnt); end
    if (cyc > nr + 3 * N + 6 || cyc < nr) begin failures++; $display("cycles %0d for %0d rules", cyc, nr); end
    $display("%0d rules over %0d inputs in %0d cycles", nr, N, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
