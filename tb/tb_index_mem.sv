// tb_index_mem: writes random rules to the whole (reduced) index memory while
// reading earlier entries back in the same cycles, then reads all of it again.
// Each rule must come back with its kernel index and target unchanged.
module tb_index_mem;
  import scnn_pkg::*;
  localparam int D = 256;
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [7:0] wr_addr = '0, rd_addr = '0;
  rule_t wr_data = '0, rd_data;
  rule_t shadow [D];
  int checks = 0, failures = 0;

  index_mem #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 8'(i); wr_data = rule_t'($urandom); shadow[i] = wr_data;
      rd_en = (i > 0); rd_addr = 8'(i / 2);
      if (i > 1) begin
        checks++;
        if (rd_data != shadow[(i - 1) / 2]) begin failures++; $display("overlapped read %0d", i); end
      end
    end
    @(negedge clk); wr_en = 0;
    for (int i = D - 1; i >= 0; i--) begin
      rd_en = 1; rd_addr = 8'(i);
      @(negedge clk);
      checks++;
      if (rd_data.kidx != shadow[i].kidx || rd_data.target != shadow[i].target) begin
        failures++; $display("rule %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
