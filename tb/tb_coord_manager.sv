// tb_coord_manager: rule-book generation against a brute-force reference.
// The coordinate manager runs with the real coordinate memory and PE array
// (reduced to 64 points and a 512-rule index memory). Point clouds are drawn by
// visiting a small grid in X, Y, Z, T order and keeping each cell with a given
// probability, which yields sorted, duplicate-free coordinates. The reference
// compares every pair of points directly (no window, no skipping) and lists,
// per input point, the neighbours in increasing order with their kernel index.
// Checked per run: every written rule, every end address, the rule count, the
// overflow flag. Runs: sparse 3D (thr 1), sparse 4D (thr 1), 3D with thr 2, a
// single point, and a dense 4D cloud whose rule book overflows the index
// memory. The partial-distance skip and the window advance must each occur.
module tb_coord_manager;
  import scnn_pkg::*;
  localparam int N = 64, D = 512, AW = 6;

  logic clk = 0, rst_n = 0, start = 0, dim4 = 0;
  logic [AW:0] n_pts = '0;
  logic [2:0] thr = 3'd1;
  logic [9:0] cm_rd_en;
  logic [9:0][AW-1:0] cm_rd_addr;
  point_t [9:0] cm_rd_data;
  logic arr_en;
  logic [9:0] arr_col_en;
  logic [9:0][7:0] arr_col_in;
  logic [9:0][9:0][7:0] arr_b;
  logic signed [9:0][9:0][DIFF_W-1:0] arr_dist;
  logic iw_en, ew_en, busy, done, overflow;
  logic [8:0] iw_addr;
  rule_t iw_data;
  logic [AW-1:0] ew_addr;
  logic [15:0] ew_data;
  logic [16:0] n_rules;
  logic [31:0] skip_cnt, block_cnt, winadv_cnt;

  // host write port of the coordinate memory
  logic h_we = 0;
  logic [AW-1:0] h_addr = '0;
  point_t h_data = '0;

  coord_mem #(.NPTS(N), .NRP(10)) u_mem (
    .clk, .wr_en(h_we), .wr_addr(h_addr), .wr_data(h_data),
    .rd_en(cm_rd_en), .rd_addr(cm_rd_addr), .rd_data(cm_rd_data));
  logic arr_valid;
  logic signed [9:0][PSUM_W-1:0] unused_sum;
  pe_array u_arr (
    .clk, .rst_n, .en(arr_en), .mode(MODE_DIST), .col_en(arr_col_en), .row_in('0),
    .col_in(arr_col_in), .b_in(arr_b), .out_valid(arr_valid), .col_sum(unused_sum),
    .diffs(arr_dist));
  coord_manager #(.NPTS(N), .IDX_DEPTH(D), .NRP(10)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int skips_seen = 0, winadv_seen = 0, overflow_seen = 0;
  point_t pts [N];
  int npts;
  // captured DUT output
  rule_t got_rules [D];
  int got_n;
  int got_end [N];

  always @(posedge clk) begin
    if (rst_n && iw_en) begin
      if (int'(iw_addr) != got_n) begin failures++; $display("rule address %0d, expected %0d", iw_addr, got_n); end
      got_rules[got_n] = iw_data;
      got_n++;
    end
    if (rst_n && ew_en) got_end[ew_addr] = int'(ew_data);
  end

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic gen(input int xs, ys, zs, ts, pct, nmax);
    npts = 0;
    for (int x = 0; x < xs; x++)
      for (int y = 0; y < ys; y++)
        for (int z = 0; z < zs; z++)
          for (int t = 0; t < ts; t++)
            if (npts < nmax && $urandom_range(0, 99) < pct) begin
              pts[npts][AX_X] = 8'(x + 3); pts[npts][AX_Y] = 8'(y * 2 + 1);
              pts[npts][AX_Z] = 8'(z + 7); pts[npts][AX_T] = 8'(t);
              npts++;
            end
  endtask

  task automatic run(input bit d4, input int th, input string name);
    rule_t ref_rules [$];
    int ref_end [N];
    int k, nexp;
    // reference rule book
    k = 2 * th + 1;
    for (int i = 0; i < npts; i++) begin
      for (int j = 0; j < npts; j++) begin
        bit nb;
        int dig [4];
        nb = 1;
        for (int a = 0; a < 4; a++) begin
          int o;
          o = int'(pts[i][a]) - int'(pts[j][a]);
          if (a == AX_T && !d4) o = 0;
          if (o > th || o < -th) nb = 0;
          dig[a] = o + th;
        end
        if (!d4) dig[AX_T] = 0;
        if (nb) ref_rules.push_back('{kidx: 8'(((dig[3] * k + dig[2]) * k + dig[1]) * k + dig[0]),
                                     target: 16'(j)});
      end
      ref_end[i] = (ref_rules.size() > D) ? D : ref_rules.size();
    end
    // load and run
    for (int i = 0; i < npts; i++) begin
      @(negedge clk); h_we = 1; h_addr = AW'(i); h_data = pts[i];
    end
    @(negedge clk); h_we = 0;
    got_n = 0;
    dim4 = d4; thr = 3'(th); n_pts = (AW+1)'(npts);
    start = 1; @(negedge clk); start = 0;
    wait (done); @(negedge clk);
    // compare
    nexp = (ref_rules.size() > D) ? D : ref_rules.size();
    checks++;
    if (got_n != nexp) begin failures++; $display("%s: %0d rules, expected %0d", name, got_n, nexp); end
    checks++;
    if (int'(n_rules) != nexp) begin failures++; $display("%s: n_rules %0d", name, n_rules); end
    for (int r = 0; r < nexp && r < got_n; r++) begin
      checks++;
      if (got_rules[r] != ref_rules[r]) begin
        failures++;
        $display("%s: rule %0d got k=%0d t=%0d exp k=%0d t=%0d", name, r,
                 got_rules[r].kidx, got_rules[r].target, ref_rules[r].kidx, ref_rules[r].target);
      end
    end
    for (int i = 0; i < npts; i++) begin
      checks++;
      if (got_end[i] != ref_end[i]) begin failures++; $display("%s: end[%0d] %0d exp %0d", name, i, got_end[i], ref_end[i]); end
    end
    checks++;
    if (overflow != (ref_rules.size() > D)) begin failures++; $display("%s: overflow flag %0d", name, overflow); end
    if (overflow) overflow_seen++;
    skips_seen  += skip_cnt;
    winadv_seen += winadv_cnt;
    $display("%s: %0d points, %0d rules (ref %0d), %0d blocks, %0d phase-2 skips, %0d window moves",
             name, npts, got_n, ref_rules.size(), block_cnt, skip_cnt, winadv_cnt);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    gen(8, 6, 6, 1, 18, N);  run(0, 1, "3D thr1");
    gen(5, 4, 4, 3, 25, N);  run(1, 1, "4D thr1");
    gen(8, 6, 6, 1, 18, N);  run(0, 2, "3D thr2");
    gen(1, 1, 1, 1, 100, 1); run(1, 1, "single point");
    gen(3, 3, 3, 3, 90, N);  run(1, 1, "4D dense (overflow)");
    checks += 3;
    if (skips_seen == 0)    begin failures++; $display("partial-distance skip never happened"); end
    if (winadv_seen == 0)   begin failures++; $display("window never advanced"); end
    if (overflow_seen == 0) begin failures++; $display("overflow never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
