// post_proc: output post-processing for the next sparse layer.
//
// Converts one accumulated output vector (PE_COLS x 24 bit) into 8-bit
// activations: optional ReLU, arithmetic right shift by a programmable amount
// (re-quantisation back to the 8-bit datapath), then saturation to the signed
// 8-bit range. One vector per cycle.
// Timing: in_valid/in_data in cycle t, out_valid/out_data registered at t+1.
// The architecture names post processing for SCNN without giving its contents;
// ReLU + shift + saturate is this design's choice.
module post_proc
  import scnn_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  avec_t       in_data,
  input  logic        relu_en,
  input  logic [4:0]  shift,
  output logic        out_valid,
  output fvec_t       out_data    // PE_COLS == PE_ROWS, so one feature vector
);

  localparam acc_t QMAX = acc_t'(2**(DATA_W-1) - 1);
  localparam acc_t QMIN = -acc_t'(2**(DATA_W-1));

  fvec_t q;
  always_comb begin
    for (int c = 0; c < PE_COLS; c++) begin
      acc_t v;
      v = in_data[c];
      if (relu_en && v < 0) v = '0;
      v = v >>> shift;
      if (v > QMAX)      q[c] = data_t'(QMAX);
      else if (v < QMIN) q[c] = data_t'(QMIN);
      else               q[c] = data_t'(v);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_data <= q;
    end
  end

endmodule
