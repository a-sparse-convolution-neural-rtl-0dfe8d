// tb_coord_mem: fills the coordinate memory with random points, then reads it
// back through all ten read ports at random addresses and compares with a
// shadow copy. Checks the one-cycle read latency and that a port holds its data
// while its read enable is low.
module tb_coord_mem;
  import scnn_pkg::*;
  localparam int N = 64;
  logic clk = 0, wr_en = 0;
  logic [5:0] wr_addr = '0;
  point_t wr_data = '0;
  logic [9:0] rd_en = '0;
  logic [9:0][5:0] rd_addr = '0;
  point_t [9:0] rd_data;
  point_t shadow [N];
  int checks = 0, failures = 0;

  coord_mem #(.NPTS(N), .NRP(10)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 6'(i); wr_data = point_t'($urandom); shadow[i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 100; t++) begin
      point_t [9:0] held;
      for (int p = 0; p < 10; p++) begin rd_en[p] = 1; rd_addr[p] = 6'($urandom); end
      @(negedge clk);
      for (int p = 0; p < 10; p++) begin
        checks++;
        if (rd_data[p] != shadow[rd_addr[p]]) begin failures++; $display("port %0d addr %0d", p, rd_addr[p]); end
      end
      held = rd_data; rd_en = '0; rd_addr = ~rd_addr;
      @(negedge clk);
      checks++;
      if (rd_data != held) begin failures++; $display("read data not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
