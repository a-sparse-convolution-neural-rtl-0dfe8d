// tb_scnn_pe: checks the reconfigurable PE in both modes.
// MAC mode: the result must equal the signed 8 x 8 product; DIST mode: the
// signed difference of the two unsigned coordinates. Covers all corner values
// and 2000 random operand pairs; the expected values are computed with plain
// integer arithmetic.
module tb_scnn_pe;
  import scnn_pkg::*;

  pe_mode_e mode;
  logic [7:0] a, b;
  logic signed [15:0] res;
  int checks = 0, failures = 0;

  scnn_pe dut (.mode, .a, .b, .res);

  task automatic check_one(input logic [7:0] ta, input logic [7:0] tb_);
    int exp_mac, exp_dist;
    exp_mac  = int'($signed(ta)) * int'($signed(tb_));
    exp_dist = int'(tb_) - int'(ta);
    a = ta; b = tb_;
    mode = MODE_MAC;  #1;
    checks++;
    if (int'(res) != exp_mac) begin
      failures++; $display("MAC a=%0d b=%0d got %0d exp %0d", $signed(ta), $signed(tb_), res, exp_mac);
    end
    mode = MODE_DIST; #1;
    checks++;
    if (int'(res) != exp_dist) begin
      failures++; $display("DIST a=%0d b=%0d got %0d exp %0d", ta, tb_, res, exp_dist);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] corners [6] = '{8'h00, 8'h01, 8'h7f, 8'h80, 8'hff, 8'h55};
    foreach (corners[i]) foreach (corners[j]) check_one(corners[i], corners[j]);
    repeat (2000) check_one(8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
