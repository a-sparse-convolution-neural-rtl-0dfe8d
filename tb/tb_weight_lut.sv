// tb_weight_lut: loads every kernel offset of the LUT row by row (one input
// channel per write) with random weights, then reads kernel indices in random
// order; each read must return the full 10 x 10 weight matrix of that offset.
module tb_weight_lut;
  import scnn_pkg::*;
  localparam int D = 128;
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [6:0] wr_kidx = '0, rd_kidx = '0;
  logic [3:0] wr_row = '0;
  data_t [9:0] wr_data = '0;
  wmat_t rd_w;
  wmat_t shadow [D];
  int checks = 0, failures = 0;

  weight_lut #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < D; k++)
      for (int r = 0; r < 10; r++) begin
        @(negedge clk);
        wr_en = 1; wr_kidx = 7'(k); wr_row = 4'(r);
        for (int c = 0; c < 10; c++) wr_data[c] = data_t'($urandom);
        shadow[k][r] = wr_data;
      end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 300; t++) begin
      rd_en = 1; rd_kidx = 7'($urandom);
      @(negedge clk);
      for (int r = 0; r < 10; r++) begin
        checks++;
        if (rd_w[r] != shadow[rd_kidx][r]) begin failures++; $display("kidx %0d row %0d", rd_kidx, r); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
