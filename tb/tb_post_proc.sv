// tb_post_proc: drives random and corner accumulator vectors with random shift
// and ReLU settings; each output lane must equal the reference
// saturate8(relu(v) >>> shift), one cycle later.
module tb_post_proc;
  import scnn_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, relu_en = 0, out_valid;
  avec_t in_data = '0;
  logic [4:0] shift = '0;
  fvec_t out_data;
  int checks = 0, failures = 0;

  post_proc dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int ref_q(int v, bit relu, int sh);
    if (relu && v < 0) v = 0;
    v = v >>> sh;
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return v;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      int vals [10];
      in_valid = 1; relu_en = 1'($urandom); shift = 5'($urandom_range(0, 12));
      for (int c = 0; c < 10; c++) begin
        case ($urandom_range(0, 3))
          0: vals[c] = $urandom_range(0, 400) - 200;
          1: vals[c] = int'($signed(24'($urandom)));
          2: vals[c] = (c % 2) ? 8388607 : -8388608;
          default: vals[c] = $urandom_range(0, 60000) - 30000;
        endcase
        in_data[c] = acc_t'(vals[c]);
      end
      @(negedge clk);
      checks++;
      if (!out_valid) begin failures++; $display("valid"); end
      for (int c = 0; c < 10; c++) begin
        checks++;
        if (int'(out_data[c]) != ref_q(vals[c], relu_en, int'(shift))) begin
          failures++; $display("t=%0d c=%0d v=%0d sh=%0d relu=%0d got %0d", t, c, vals[c], shift, relu_en, out_data[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
