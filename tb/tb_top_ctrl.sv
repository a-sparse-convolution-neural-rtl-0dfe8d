// tb_top_ctrl: phase sequencing of the top controller.
// Small responders stand in for the coordinate manager and SCNN engine: each
// answers its start pulse with a done pulse after a random delay. Checked for the
// three phase selections (both, CM only, SC only): the start pulses that must and
// must not appear, the array mode during each phase, that exactly n_pts clear
// writes to addresses 0..n_pts-1 come before the SC start, the cycle counters,
// and that done pulses once with busy then dropping.
module tb_top_ctrl;
  import scnn_pkg::*;
  localparam int N = 64, AW = 6;

  logic clk = 0, rst_n = 0, start = 0, run_cm = 0, run_sc = 0;
  logic [AW:0] n_pts = '0;
  logic cm_start, cm_done = 0, sc_start, sc_done = 0, clr_en, busy, done;
  logic [AW-1:0] clr_addr;
  pe_mode_e arr_mode;
  logic [31:0] cm_cycles, sc_cycles;

  top_ctrl #(.NPTS(N)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_cm_start, n_sc_start, n_clr, n_done, clr_next, clr_after_sc, mode_err;
  int cm_delay, sc_delay, cm_busy_cyc;
  bit cm_active, sc_active;

  always @(posedge clk) if (rst_n) begin
    if (cm_start) begin n_cm_start++; cm_active = 1; end
    if (sc_start) begin n_sc_start++; sc_active = 1; end
    if (clr_en) begin
      n_clr++;
      if (int'(clr_addr) != clr_next) mode_err++;
      clr_next++;
      if (n_sc_start != 0) clr_after_sc++;
    end
    if (cm_active && arr_mode != MODE_DIST) mode_err++;
    if (sc_active && arr_mode != MODE_MAC) mode_err++;
    if (cm_active) cm_busy_cyc++;
    if (done) n_done++;
  end

  // responders
  initial forever begin
    @(posedge clk);
    if (cm_active) begin
      repeat (cm_delay) @(posedge clk);
      #1 cm_done = 1; @(posedge clk); #1 cm_done = 0; cm_active = 0;
    end
  end
  initial forever begin
    @(posedge clk);
    if (sc_active) begin
      repeat (sc_delay) @(posedge clk);
      #1 sc_done = 1; @(posedge clk); #1 sc_done = 0; sc_active = 0;
    end
  end

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input bit cm, input bit sc, input int n);
    n_cm_start = 0; n_sc_start = 0; n_clr = 0; n_done = 0; clr_next = 0;
    clr_after_sc = 0; mode_err = 0; cm_busy_cyc = 0;
    cm_delay = $urandom_range(3, 40); sc_delay = $urandom_range(3, 40);
    @(negedge clk);
    run_cm = cm; run_sc = sc; n_pts = (AW+1)'(n);
    start = 1; @(negedge clk); start = 0;
    checks++;
    if (!busy) begin failures++; $display("not busy after start"); end
    wait (done); @(negedge clk); @(negedge clk);
    checks += 7;
    if (n_cm_start != int'(cm)) begin failures++; $display("cm starts %0d", n_cm_start); end
    if (n_sc_start != int'(sc)) begin failures++; $display("sc starts %0d", n_sc_start); end
    if (n_clr != (sc ? n : 0))  begin failures++; $display("clears %0d", n_clr); end
    if (clr_after_sc != 0 || mode_err != 0) begin failures++; $display("order/mode errors"); end
    if (n_done != 1 || busy)    begin failures++; $display("done/busy"); end
    if (cm && int'(cm_cycles) < cm_delay) begin failures++; $display("cm_cycles %0d", cm_cycles); end
    if (sc && int'(sc_cycles) < n + sc_delay) begin failures++; $display("sc_cycles %0d", sc_cycles); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(1, 1, 37);
    run(1, 0, 20);
    run(0, 1, 64);
    run(1, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
