// tb_out_accum: clears the (reduced) output memory, then issues a random stream
// of accumulations, one per cycle with occasional gaps, to a small address range
// so that back-to-back hits on the same target are frequent. A reference model
// adds the same vectors; at the end every entry is read back and compared. The
// number of forwarding (bypass) events is counted and must be non-zero.
module tb_out_accum;
  import scnn_pkg::*;
  localparam int N = 32;
  logic clk = 0, rst_n = 0, clr_en = 0, acc_valid = 0, rd_en = 0, bypass_hit;
  logic [4:0] clr_addr = '0, acc_addr = '0, rd_addr = '0;
  psvec_t acc_data = '0;
  avec_t rd_data;
  longint model [N][10];
  int checks = 0, failures = 0, bypasses = 0;

  out_accum #(.NPTS(N)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && bypass_hit) bypasses++;

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      clr_en = 1; clr_addr = 5'(i);
      for (int c = 0; c < 10; c++) model[i][c] = 0;
      @(negedge clk);
    end
    clr_en = 0;
    for (int t = 0; t < 2000; t++) begin
      acc_valid = ($urandom_range(0, 7) != 0);
      acc_addr  = 5'($urandom_range(0, 5));
      for (int c = 0; c < 10; c++) acc_data[c] = psum_t'($urandom_range(0, 60000) - 30000);
      if (acc_valid) for (int c = 0; c < 10; c++) model[acc_addr][c] += longint'(acc_data[c]);
      @(negedge clk);
    end
    acc_valid = 0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      rd_en = 1; rd_addr = 5'(i);
      @(negedge clk);
      for (int c = 0; c < 10; c++) begin
        checks++;
        if (rd_data[c] != acc_t'(model[i][c])) begin
          failures++; $display("addr %0d ch %0d got %0d exp %0d", i, c, rd_data[c], acc_t'(model[i][c]));
        end
      end
    end
    checks++;
    if (bypasses == 0) begin failures++; $display("no bypass exercised"); end
    $display("bypass events: %0d", bypasses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
