// tb_pe_array: checks the 10 x 10 PE array in MAC and DIST mode.
// MAC: random features and weights; each column sum must equal the reference
// dot product of the feature vector with that weight column, one cycle after en.
// DIST: random query and candidates with random column enables; enabled columns
// must give candidate - query, disabled ones zero. Also checks that results hold
// while en is low and that out_valid follows en by one cycle.
module tb_pe_array;
  import scnn_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  pe_mode_e mode = MODE_MAC;
  logic [9:0] col_en = '0;
  logic [9:0][7:0] row_in = '0, col_in = '0;
  logic [9:0][9:0][7:0] b_in = '0;
  logic out_valid;
  logic signed [9:0][PSUM_W-1:0] col_sum;
  logic signed [9:0][9:0][DIFF_W-1:0] diffs;
  int checks = 0, failures = 0;

  pe_array dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_s [10];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      en = 1;
      mode = (t % 2) ? MODE_DIST : MODE_MAC;
      col_en = 10'($urandom);
      for (int r = 0; r < 10; r++) begin
        row_in[r] = 8'($urandom);
        col_in[r] = 8'($urandom);
        for (int c = 0; c < 10; c++) b_in[r][c] = 8'($urandom);
      end
      if (t == 0) begin   // extreme values: all -128 x -128
        for (int r = 0; r < 10; r++) begin
          row_in[r] = 8'h80;
          for (int c = 0; c < 10; c++) b_in[r][c] = 8'h80;
        end
      end
      @(negedge clk);
      en = 0;
      checks++;
      if (!out_valid) begin failures++; $display("t=%0d out_valid low", t); end
      if (mode == MODE_MAC) begin
        for (int c = 0; c < 10; c++) begin
          exp_s[c] = 0;
          for (int r = 0; r < 10; r++) exp_s[c] += int'($signed(row_in[r])) * int'($signed(b_in[r][c]));
          checks++;
          if (int'($signed(col_sum[c])) != exp_s[c]) begin
            failures++; $display("t=%0d col %0d got %0d exp %0d", t, c, col_sum[c], exp_s[c]);
          end
        end
      end else begin
        for (int r = 0; r < 10; r++)
          for (int c = 0; c < 10; c++) begin
            int e;
            e = col_en[c] ? int'(b_in[r][c]) - int'(col_in[c]) : 0;
            checks++;
            if (int'($signed(diffs[r][c])) != e) begin
              failures++; $display("t=%0d diff[%0d][%0d] got %0d exp %0d", t, r, c, diffs[r][c], e);
            end
          end
      end
      // hold check: with en low, outputs must not change
      begin
        logic signed [9:0][PSUM_W-1:0] s0;
        s0 = col_sum;
        row_in = ~row_in;
        @(negedge clk);
        checks++;
        if (out_valid || col_sum != s0) begin failures++; $display("t=%0d not held", t); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
