// out_accum: output memory with accumulator.
//
// Every rule of the rule book produces PE_COLS partial sums for one target
// output point; this block adds them into that point's accumulator vector. The
// memory is synchronous, so an accumulation is a two-stage read-modify-write:
// stage A reads the target entry, stage B adds the incoming sums and writes back.
// Back-to-back rules that hit the same target (the last rule of one input and the
// first of the next often do) would read a stale value in stage A, so stage B
// forwards the value it wrote the cycle before when the addresses match
// (bypass_hit pulses when that happens).
// A clear port zeroes one entry per cycle before a layer; a read port lets the
// post-processing unit drain the results.
// Timing: acc_valid in cycle t is written at the end of t+1. rd_en in cycle t
// gives rd_data from t+1 (held). Clear and accumulate must not be mixed.
// Accumulating MAC outputs into rule-book target addresses follows the
// architecture; the 24-bit accumulators and the pipeline are this design's
// choices. Accumulators wrap on overflow.
module out_accum
  import scnn_pkg::*;
#(
  parameter int unsigned NPTS = 1024,
  localparam int unsigned AW  = $clog2(NPTS)
)(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr_en,
  input  logic [AW-1:0]   clr_addr,
  input  logic            acc_valid,
  input  logic [AW-1:0]   acc_addr,
  input  psvec_t          acc_data,
  input  logic            rd_en,
  input  logic [AW-1:0]   rd_addr,
  output avec_t           rd_data,
  output logic            bypass_hit
);

  avec_t mem [NPTS];

  // stage A -> B registers
  logic        b_valid;
  logic [AW-1:0] b_addr;
  psvec_t      b_data;
  avec_t       b_old;      // memory read of stage A
  // last write (for forwarding)
  logic        w_valid;
  logic [AW-1:0] w_addr;
  avec_t       w_data;

  avec_t base, sum;
  always_comb begin
    bypass_hit = b_valid && w_valid && (w_addr == b_addr);
    base = bypass_hit ? w_data : b_old;
    for (int c = 0; c < PE_COLS; c++) sum[c] = base[c] + ACC_W'(b_data[c]);
  end

  always_ff @(posedge clk) begin
    if (acc_valid) b_old <= mem[acc_addr];
    if (rd_en)     rd_data <= mem[rd_addr];
    if (b_valid)   mem[b_addr] <= sum;
    else if (clr_en) mem[clr_addr] <= '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_valid <= 1'b0;
      b_addr  <= '0;
      b_data  <= '0;
      w_valid <= 1'b0;
      w_addr  <= '0;
      w_data  <= '0;
    end else begin
      b_valid <= acc_valid;
      if (acc_valid) begin
        b_addr <= acc_addr;
        b_data <= acc_data;
      end
      w_valid <= b_valid;
      if (b_valid) begin
        w_addr <= b_addr;
        w_data <= sum;
      end
    end
  end

endmodule
