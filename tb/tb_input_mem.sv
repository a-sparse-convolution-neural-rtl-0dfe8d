// tb_input_mem: writes random feature vectors (host port) and end addresses
// (coordinate-manager port), sometimes in the same cycle to different entries,
// then reads every entry and compares both fields with shadow copies.
module tb_input_mem;
  import scnn_pkg::*;
  localparam int N = 64;
  logic clk = 0, fw_en = 0, ew_en = 0, rd_en = 0;
  logic [5:0] fw_addr = '0, ew_addr = '0, rd_addr = '0;
  fvec_t fw_data = '0, rd_feat;
  logic [15:0] ew_data = '0, rd_end;
  fvec_t sf [N];
  logic [15:0] se [N];
  int checks = 0, failures = 0;

  input_mem #(.NPTS(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      fw_en = 1; fw_addr = 6'(i); fw_data = {$urandom, $urandom, $urandom}; sf[i] = fw_data;
      ew_en = 1; ew_addr = 6'(N - 1 - i); ew_data = 16'($urandom); se[N - 1 - i] = ew_data;
    end
    @(negedge clk); fw_en = 0; ew_en = 0;
    for (int i = 0; i < N; i++) begin
      rd_en = 1; rd_addr = 6'(i);
      @(negedge clk);
      checks += 2;
      if (rd_feat != sf[i]) begin failures++; $display("feat %0d", i); end
      if (rd_end  != se[i]) begin failures++; $display("end %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
